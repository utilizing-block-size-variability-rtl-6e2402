// bpc: block pointer cache (BPC) of the VSBC.
//
// NBPC lines, one per trace. A line (vsbc_pkg::trace_t) holds the thread ID, a
// valid bit, the full head and tail address and the BBC way of each of the 4
// basic blocks, the branch status of the first 3 blocks and an LRU rank. The
// lines are divided evenly among the NTH threads: thread t owns lines
// t*P .. t*P+P-1 with P = NBPC/NTH, and replacement stays inside that range.
//
// Lookup (combinational): the full fetch address is compared with every head
// address of every valid line of the thread. A match at block k is a hit on
// the trace from block k on; the branch status of blocks k, k+1, ... is then
// compared with the predictions lk_pred[0], lk_pred[1], ... and the delivery
// stops after the first block whose branch disagrees. lk_nblk is the number of
// blocks that can be delivered; of several matching lines the one delivering
// the most blocks wins (lowest line on a tie). A hit with lk_en set makes that
// line the most recently used at the clock edge.
//
// Insert (at the clock edge): a completed trace replaces the line of the same
// thread with the same first head address and branch status if there is one;
// otherwise it goes to an invalid line of the thread's range, otherwise to the
// least recently used line of that range. LRU is kept exactly with a rank per
// line (0 = most recent, P-1 = least recent). lk_en and ins_en must not be set
// in the same cycle (the storage module serves one request per cycle).
//
// From the design: the line fields, full-address lookup on any block head,
// LRU replacement, dedicated lines per thread. This design's own choices: the
// rank form of LRU, the merge of an identical trace, the longest-delivery rule
// between matching lines, and a synchronous active-low reset that clears all
// valid bits.
module bpc
  import vsbc_pkg::*;
#(
  parameter int unsigned NBPC = 512,
  parameter int unsigned NTH  = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic            lk_en,
  input  tid_t            lk_tid,
  input  addr_t           lk_addr,
  input  logic [NBLK-2:0] lk_pred,
  output logic            lk_hit,
  output logic [NBW-1:0]  lk_nblk,
  output logic [1:0]      lk_start,
  output trace_t          lk_trace,
  // insert
  input  logic            ins_en,
  input  trace_t          ins_trace,
  output logic            ins_merge,   // an existing line of the same trace is rewritten
  output logic            ins_evict    // a valid line is replaced
);
  localparam int unsigned P  = NBPC / NTH;
  localparam int unsigned RW = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned LW = (NBPC > 1) ? $clog2(NBPC) : 1;

  typedef logic [RW-1:0] rank_t;
  typedef logic [LW-1:0] line_t;

  trace_t lines [NBPC];
  rank_t  rank  [NBPC];

  function automatic logic owns(int unsigned i, tid_t t);
    return (i / P) == int'(t);
  endfunction

  // ---- lookup ----------------------------------------------------------------
  // Per line: number of blocks it can deliver for this address and prediction
  // (0 = no head matches) and the block the delivery starts at.
  logic [NBW-1:0] ln_n     [NBPC];
  logic [1:0]     ln_start [NBPC];

  for (genvar g = 0; g < NBPC; g++) begin : g_line
    always_comb begin
      logic        m, cont;
      int unsigned k, n;
      m = 1'b0; k = 0; n = 0; cont = 1'b1;
      if (lines[g].valid && lines[g].tid == lk_tid && owns(g, lk_tid)) begin
        for (int b = NBLK - 1; b >= 0; b--)
          if (lines[g].head[b] == lk_addr) begin m = 1'b1; k = b; end
      end
      if (m) begin
        n = 1;
        for (int unsigned j = 0; j < NBLK - 1; j++)
          if (j >= k && cont) begin
            if (lines[g].br[j] == lk_pred[j-k]) n++;
            else cont = 1'b0;
          end
      end
      ln_n[g]     = NBW'(n);
      ln_start[g] = 2'(k);
    end
  end

  line_t lk_line;
  always_comb begin
    lk_hit = 1'b0; lk_nblk = '0; lk_start = '0; lk_line = '0;
    for (int unsigned i = 0; i < NBPC; i++)
      if (ln_n[i] > lk_nblk) begin
        lk_hit = 1'b1; lk_nblk = ln_n[i]; lk_start = ln_start[i]; lk_line = line_t'(i);
      end
    lk_trace = lines[lk_line];
  end

  // ---- insert target -----------------------------------------------------------
  line_t ins_line;
  always_comb begin
    logic  got_m, got_i;
    line_t m_line, i_line, l_line;
    got_m = 1'b0; got_i = 1'b0; m_line = '0; i_line = '0; l_line = '0;
    for (int unsigned i = 0; i < NBPC; i++) begin
      if (owns(i, ins_trace.tid)) begin
        if (!got_m && lines[i].valid && lines[i].tid == ins_trace.tid &&
            lines[i].head[0] == ins_trace.head[0] && lines[i].br == ins_trace.br) begin
          got_m = 1'b1; m_line = line_t'(i);
        end
        if (!got_i && !lines[i].valid) begin
          got_i = 1'b1; i_line = line_t'(i);
        end
        if (rank[i] == rank_t'(P - 1)) l_line = line_t'(i);
      end
    end
    ins_merge = ins_en && got_m;
    ins_evict = ins_en && !got_m && !got_i;
    ins_line  = got_m ? m_line : (got_i ? i_line : l_line);
  end

  // ---- state update -------------------------------------------------------------
  logic  touch;
  line_t touch_line;
  tid_t  touch_tid;
  assign touch      = (lk_en && lk_hit) || ins_en;
  assign touch_line = ins_en ? ins_line : lk_line;
  assign touch_tid  = ins_en ? ins_trace.tid : lk_tid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NBPC; i++) begin
        lines[i].valid <= 1'b0;
        rank[i]        <= rank_t'(i % P);
      end
    end else begin
      if (ins_en) begin
        lines[ins_line]       <= ins_trace;
        lines[ins_line].valid <= 1'b1;
      end
      if (touch) begin
        for (int unsigned i = 0; i < NBPC; i++)
          if (owns(i, touch_tid) && rank[i] < rank[touch_line]) rank[i] <= rank[i] + 1'b1;
        rank[touch_line] <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(lk_en && ins_en));
  assert property (@(posedge clk) disable iff (!rst_n) ins_en |-> int'(ins_trace.tid) < NTH);
endmodule
