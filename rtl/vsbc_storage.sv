// vsbc_storage: the VSBC storage module, holding the block pointer cache (BPC)
// and the shared basic block cache (BBC) and deciding each thread's mode.
//
// Requesters: a trace lookup port and a write port per thread. All 2*NTH
// requesters share the module through a round-robin arbiter, one request per
// cycle; a request is accepted in the cycle its ready output is high. A write
// either stores one executed instruction in the BBC (WR_INSTR; for the first
// instruction of a block the chosen way is returned on wr_way in that cycle)
// or copies a completed trace build buffer into the BPC (WR_TRACE).
//
// A lookup takes two cycles. In the cycle it is accepted the BPC is searched
// with the full address and the branch predictions (trace-hit conditions 1 and
// 3) and the selected line is registered. In the next cycle the blocks to be
// delivered are read from the BBC, block j through read port j of every way,
// and their tags are checked (condition 2): delivery is cut before the first
// block whose lines are not all present in the recorded way. res_valid is high
// in that second cycle with the result record (res) and the raw data of all
// ways (res_data), and the thread's mode flips to trace delivery on a hit and
// back to trace assembly on a miss. While a thread has a lookup in its second
// cycle its next lookup is held back.
//
// From the design: the BPC/BBC split, the three trace-hit conditions, round-
// robin service of simultaneous requests, mode decided in the storage module,
// BPC lines dedicated to threads and a thread-shared BBC. This design's own
// choices: the two-cycle timing, one request per cycle, and delivering a
// shorter (partial) trace when a later block fails a check.
module vsbc_storage
  import vsbc_pkg::*;
#(
  parameter int unsigned NTH   = 2,
  parameter int unsigned NBPC  = 512,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned LINES = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lookup ports
  input  logic  [NTH-1:0]         lk_valid,
  input  addr_t [NTH-1:0]         lk_addr,
  input  logic  [NTH-1:0][NBLK-2:0] lk_pred,
  output logic  [NTH-1:0]         lk_ready,
  // write ports
  input  logic    [NTH-1:0]       wr_valid,
  input  wr_req_t [NTH-1:0]       wr_req,
  output logic    [NTH-1:0]       wr_ready,
  output way_t                    wr_way,
  // lookup result
  output logic                    res_valid,
  output lk_res_t                 res,
  output instr_t [WAYS-1:0][NBLK-1:0][PORT_W-1:0] res_data,
  // operating mode per thread: 1 = trace delivery, 0 = trace assembly
  output logic  [NTH-1:0]         mode
);
  localparam int unsigned NR = 2 * NTH;

  // ---- arbitration -----------------------------------------------------------
  logic   [NR-1:0] req, gnt;
  logic            s1_valid;
  tid_t            s1_tid;

  always_comb begin
    for (int unsigned t = 0; t < NTH; t++) begin
      req[2*t]     = lk_valid[t] && !(s1_valid && s1_tid == tid_t'(t));
      req[2*t + 1] = wr_valid[t];
      lk_ready[t]  = gnt[2*t];
      wr_ready[t]  = gnt[2*t + 1];
    end
  end

  rr_arbiter #(.N(NR)) u_arb (.clk, .rst_n, .req, .gnt);

  // granted requester
  logic    g_lk, g_wr;
  tid_t    g_tid;
  always_comb begin
    g_lk = 1'b0; g_wr = 1'b0; g_tid = '0;
    for (int unsigned r = 0; r < NR; r++)
      if (gnt[r]) begin
        g_tid = tid_t'(r / 2);
        if (r % 2 == 0) g_lk = 1'b1; else g_wr = 1'b1;
      end
  end

  wr_req_t g_wreq;
  addr_t   g_addr;
  logic [NBLK-2:0] g_pred;
  assign g_wreq = wr_req[g_tid];
  assign g_addr = lk_addr[g_tid];
  assign g_pred = lk_pred[g_tid];

  // ---- BPC ---------------------------------------------------------------------
  logic           bpc_hit, ins_merge, ins_evict;
  logic [NBW-1:0] bpc_nblk;
  logic [1:0]     bpc_start;
  trace_t         bpc_trace, ins_trace;

  always_comb begin
    ins_trace     = g_wreq.trace;
    ins_trace.tid = g_tid;
  end

  bpc #(.NBPC(NBPC), .NTH(NTH)) u_bpc (
    .clk, .rst_n,
    .lk_en   (g_lk),
    .lk_tid  (g_tid),
    .lk_addr (g_addr),
    .lk_pred (g_pred),
    .lk_hit  (bpc_hit),
    .lk_nblk (bpc_nblk),
    .lk_start(bpc_start),
    .lk_trace(bpc_trace),
    .ins_en  (g_wr && g_wreq.kind == WR_TRACE),
    .ins_trace,
    .ins_merge,
    .ins_evict
  );

  // ---- stage 1 register ----------------------------------------------------------
  addr_t          s1_addr;
  logic           s1_hit;
  logic [NBW-1:0] s1_nblk;
  logic [1:0]     s1_start;
  trace_t         s1_trace;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_tid   <= '0;
    end else begin
      s1_valid <= g_lk;
      if (g_lk) begin
        s1_tid   <= g_tid;
        s1_addr  <= g_addr;
        s1_hit   <= bpc_hit;
        s1_nblk  <= bpc_nblk;
        s1_start <= bpc_start;
        s1_trace <= bpc_trace;
      end
    end
  end

  // ---- BBC -----------------------------------------------------------------------
  addr_t [NBLK-1:0]            rd_addr;
  logic  [WAYS-1:0][NBLK-1:0][PORT_W-1:0] rd_hit;
  way_t  [NBLK-1:0]            slot_way;
  logic  [NBLK-1:0][LENW-1:0]  slot_len;

  always_comb begin
    for (int unsigned j = 0; j < NBLK; j++) begin
      int unsigned src;
      src = int'(s1_start) + j;
      if (src < NBLK) begin
        rd_addr[j]  = s1_trace.head[src];
        slot_way[j] = s1_trace.way[src];
        slot_len[j] = blk_len(s1_trace.head[src], s1_trace.tail[src]);
      end else begin
        rd_addr[j]  = '0;
        slot_way[j] = '0;
        slot_len[j] = '0;
      end
    end
  end

  bbc #(.WAYS(WAYS), .LINES(LINES)) u_bbc (
    .clk, .rst_n,
    .wr_en    (g_wr && g_wreq.kind == WR_INSTR),
    .wr_tid   (g_tid),
    .wr_addr  (g_wreq.addr),
    .wr_data  (g_wreq.data),
    .wr_first (g_wreq.first),
    .wr_way_in(g_wreq.way),
    .wr_way,
    .rd_tid   (s1_tid),
    .rd_addr,
    .rd_data  (res_data),
    .rd_hit
  );

  // ---- stage 2: tag check and result --------------------------------------------
  always_comb begin
    logic cont;
    int unsigned n;
    cont = s1_hit; n = 0;
    for (int unsigned j = 0; j < NBLK; j++) begin
      logic ok;
      ok = (j < int'(s1_nblk)) && int'(slot_way[j]) < WAYS;
      for (int unsigned i = 0; i < PORT_W; i++)
        if (i < int'(slot_len[j]) && int'(slot_way[j]) < WAYS && !rd_hit[slot_way[j]][j][i]) ok = 1'b0;
      if (cont && ok) n++;
      else cont = 1'b0;
    end
    res.tid     = s1_tid;
    res.hit     = (n > 0);
    res.partial = (n > 0) && (n < NBLK - int'(s1_start));
    res.nblk    = NBW'(n);
    res.addr    = s1_addr;
    for (int unsigned j = 0; j < NBLK; j++) begin
      res.way[j] = slot_way[j];
      res.len[j] = (j < n) ? slot_len[j] : '0;
    end
  end
  assign res_valid = s1_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) mode <= '0;
    else
      for (int unsigned t = 0; t < NTH; t++)
        if (s1_valid && s1_tid == tid_t'(t)) mode[t] <= res.hit;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({g_lk, g_wr}));
endmodule
