// coalescing_buffer: per-thread VSBC coalescing buffer.
//
// A trace's blocks may sit in different ways of the basic block cache, each
// at its own place. The storage module presents, for every block slot j, the
// PORT_W instructions read by port j of every way. In one cycle this buffer
//   1. selects for each slot the way recorded for that block (one mux per
//      block),
//   2. lays the blocks side by side in a NBLK*PORT_W instruction row
//      (rearranging), and
//   3. packs them together so that block j+1 starts right after the last
//      instruction of block j (coalescing),
// and registers the packed trace. It then hands it to the decoder and
// execution engine DELIVER_W instructions per cycle, starting the cycle after
// the result arrives. busy is high while instructions remain; the thread must
// not start a new lookup then. A miss result produces no delivery; it is
// reported through resp_valid/resp_hit in the same cycle as a hit would be.
//
// From the design: way mux per block, rearrange and coalesce in one cycle,
// one buffer per thread, at most 16 instructions delivered per cycle. This
// design's own choices: the register stage and the chunked delivery timing.
module coalescing_buffer
  import vsbc_pkg::*;
#(
  parameter int unsigned WAYS      = 4,
  parameter int unsigned DELIVER_W = 16,
  parameter int unsigned TID       = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  // result from the storage module (for any thread)
  input  logic     res_valid,
  input  lk_res_t  res,
  input  instr_t [WAYS-1:0][NBLK-1:0][PORT_W-1:0] res_data,
  // lookup response of this thread
  output logic     resp_valid,
  output logic     resp_hit,
  output logic     resp_partial,
  output logic [CNTW-1:0] resp_len,     // trace length in instructions
  // delivery
  output logic     out_valid,
  output logic [$clog2(DELIVER_W+1)-1:0] out_count,
  output instr_t [DELIVER_W-1:0] out_instr,
  output logic     out_last,
  output logic     busy
);
  localparam int unsigned SLOTS = NBLK * PORT_W;
  localparam int unsigned OCW   = $clog2(DELIVER_W + 1);

  logic mine;
  assign mine = res_valid && res.tid == tid_t'(TID);

  // ---- way select, rearrange, coalesce --------------------------------------
  instr_t [SLOTS-1:0] row;      // rearranged: block j in slots j*PORT_W ..
  instr_t [SLOTS-1:0] packed_t; // coalesced
  logic   [CNTW-1:0]  total;

  always_comb begin
    for (int unsigned j = 0; j < NBLK; j++)
      for (int unsigned i = 0; i < PORT_W; i++)
        row[j*PORT_W + i] = (int'(res.way[j]) < WAYS) ? res_data[res.way[j]][j][i] : '0;
  end

  always_comb begin
    int unsigned off;
    packed_t = '0;
    off = 0;
    for (int unsigned j = 0; j < NBLK; j++) begin
      for (int unsigned i = 0; i < PORT_W; i++)
        if (i < int'(res.len[j])) packed_t[off + i] = row[j*PORT_W + i];
      off = off + int'(res.len[j]);
    end
    total = CNTW'(off);
  end

  // ---- trace register and delivery ---------------------------------------------
  instr_t [SLOTS-1:0] buf_q;
  logic   [CNTW-1:0]  rem, pos;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rem          <= '0;
      pos          <= '0;
      resp_valid   <= 1'b0;
      resp_hit     <= 1'b0;
      resp_partial <= 1'b0;
      resp_len     <= '0;
    end else begin
      resp_valid <= mine;
      if (mine) begin
        resp_hit     <= res.hit;
        resp_partial <= res.partial;
        resp_len     <= res.hit ? total : '0;
        buf_q        <= packed_t;
        rem          <= res.hit ? total : '0;
        pos          <= '0;
      end else if (rem != '0) begin
        rem <= (rem > CNTW'(DELIVER_W)) ? rem - CNTW'(DELIVER_W) : '0;
        pos <= pos + CNTW'(DELIVER_W);
      end
    end
  end

  always_comb begin
    out_valid = (rem != '0);
    out_count = (rem > CNTW'(DELIVER_W)) ? OCW'(DELIVER_W) : OCW'(rem);
    out_last  = out_valid && (rem <= CNTW'(DELIVER_W));
    for (int unsigned i = 0; i < DELIVER_W; i++)
      out_instr[i] = (i < int'(out_count)) ? buf_q[(int'(pos) + i) % SLOTS] : '0;
  end
  assign busy = (rem != '0);

  assert property (@(posedge clk) disable iff (!rst_n) mine |-> !busy);
endmodule
