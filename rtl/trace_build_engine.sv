// trace_build_engine: per-thread VSBC trace build engine, built around the
// trace build buffer (TBB).
//
// It watches the thread's stream of executed instructions (address,
// instruction word, branch information). Each instruction is written to the
// shared basic block cache through the storage module's write port, so the
// stream advances only when that write is accepted (ret_ready). The engine
// finds the basic blocks in the stream: the first instruction after a block
// end is the next block's head; a control instruction ends a block and its
// address is the tail. A block is also closed after PORT_W instructions so
// that every stored block fits one BBC read port. For the first three blocks
// the branch status is recorded: the taken bit of a conditional branch, 1 for
// an unconditional control transfer, 0 for a block closed by the length
// limit. The BBC way chosen for a block's first instruction (wr_way, returned
// in the same cycle) is kept in the TBB and used for the rest of the block.
// After the fourth block ends, the TBB is copied into the block pointer cache
// with a WR_TRACE request; the executed-instruction stream waits meanwhile and
// the next trace starts with the next block.
//
// From the design: the TBB fields, head recorded after a block end, tail =
// address of the control instruction ending the block, branch status filled
// for conditional branches, copy to the BPC once all fields are filled. This
// design's own choices: the handshake, the PORT_W block length limit and the
// status values for unconditional and length-limited ends. Synchronous,
// active-low reset.
module trace_build_engine
  import vsbc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // executed-instruction stream of this thread
  input  logic    ret_valid,
  input  addr_t   ret_pc,
  input  instr_t  ret_instr,
  input  logic    ret_ctrl,    // control instruction (ends a basic block)
  input  logic    ret_cond,    // conditional branch
  input  logic    ret_taken,   // branch outcome
  output logic    ret_ready,
  // write port toward the storage module
  output logic    wr_valid,
  output wr_req_t wr_req,
  input  logic    wr_ready,
  input  way_t    wr_way       // way chosen for a block's first instruction
);
  localparam int unsigned BW = $clog2(NBLK);

  // trace build buffer
  addr_t [NBLK-1:0] tbb_head, tbb_tail;
  way_t  [NBLK-1:0] tbb_way;
  logic  [NBLK-2:0] tbb_br;
  logic  [BW-1:0]   blk;        // block being built
  logic  [LENW-1:0] cur_len;    // instructions so far in that block (0 = at a head)
  way_t             cur_way;
  logic             commit;     // TBB full, waiting to be copied to the BPC

  logic first, blk_end, acc;
  assign first   = (cur_len == '0);
  assign blk_end = ret_ctrl || (cur_len == LENW'(PORT_W - 1));

  always_comb begin
    wr_req            = '0;
    wr_req.kind       = commit ? WR_TRACE : WR_INSTR;
    wr_req.addr       = ret_pc;
    wr_req.data       = ret_instr;
    wr_req.first      = first;
    wr_req.way        = cur_way;
    wr_req.trace.head = tbb_head;
    wr_req.trace.tail = tbb_tail;
    wr_req.trace.way  = tbb_way;
    wr_req.trace.br   = tbb_br;
    wr_req.trace.valid = 1'b1;
    wr_valid  = commit || ret_valid;
    ret_ready = !commit && wr_ready;
  end
  assign acc = ret_valid && ret_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blk     <= '0;
      cur_len <= '0;
      cur_way <= '0;
      commit  <= 1'b0;
    end else if (commit) begin
      if (wr_ready) commit <= 1'b0;
    end else if (acc) begin
      if (first) begin
        tbb_head[blk] <= ret_pc;
        tbb_way[blk]  <= wr_way;
        cur_way       <= wr_way;
      end
      if (blk_end) begin
        tbb_tail[blk] <= ret_pc;
        if (int'(blk) < NBLK - 1)
          tbb_br[blk] <= ret_ctrl ? (ret_cond ? ret_taken : 1'b1) : 1'b0;
        cur_len <= '0;
        if (int'(blk) == NBLK - 1) begin
          blk    <= '0;
          commit <= 1'b1;
        end else begin
          blk <= blk + 1'b1;
        end
      end else begin
        cur_len <= cur_len + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) commit |-> !ret_ready);
endmodule
