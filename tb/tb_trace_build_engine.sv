// tb_trace_build_engine: self-checking test of the trace build engine.
// A random dynamic instruction path is generated: basic blocks of 1..24
// instructions, each ended by a conditional branch (taken or not) or an
// unconditional jump. The testbench plays the storage module, accepting
// writes at random and returning a random way for each block's first
// instruction, and feeds the path with random gaps. Independently it splits
// the path into stored blocks (a control instruction or 16 instructions end a
// block) and groups of four blocks, and checks every instruction write
// (address, data, first flag, way) and every trace copied to the block
// pointer cache (heads, tails, ways, branch status).
module tb_trace_build_engine;
  import vsbc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ret_valid = 0, ret_ctrl, ret_cond, ret_taken, ret_ready;
  addr_t ret_pc;
  instr_t ret_instr;
  logic wr_valid, wr_ready = 0;
  wr_req_t wr_req;
  way_t wr_way = '0;

  int checks = 0, failures = 0;
  int n_cut = 0, n_uncond = 0, n_traces = 0;

  localparam int NI = 4000;
  addr_t  p_pc   [NI];
  instr_t p_ins  [NI];
  bit     p_ctrl [NI], p_cond [NI], p_tkn [NI];
  bit     p_first[NI];           // first instruction of a stored block
  int     blk_start[$], blk_end[$];
  logic   blk_br[$];
  way_t   blk_way[$];

  trace_build_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %h expected %h (pos %0d trace %0d)", $time, what, got, exp, pos, n_traces);
    end
  endfunction

  // build the path and the expected block split
  initial begin
    int i = 0;
    addr_t pc = 32'h1000;
    while (i < NI) begin
      int len, cl;
      len = $urandom_range(1, 24);
      cl = 0;
      for (int k = 0; k < len && i < NI; k++) begin
        p_pc[i] = pc; p_ins[i] = $urandom;
        p_ctrl[i] = (k == len - 1);
        p_cond[i] = p_ctrl[i] && ($urandom_range(0, 3) != 0);
        p_tkn[i]  = p_cond[i] ? 1'($urandom) : p_ctrl[i];
        p_first[i] = (cl == 0);
        if (cl == 0) blk_start.push_back(i);
        cl++;
        if (p_ctrl[i] || cl == PORT_W) begin
          blk_end.push_back(i);
          blk_br.push_back(p_ctrl[i] ? (p_cond[i] ? p_tkn[i] : 1'b1) : 1'b0);
          if (!p_ctrl[i]) n_cut++;
          else if (!p_cond[i]) n_uncond++;
          cl = 0;
        end
        pc = p_ctrl[i] && p_tkn[i] ? addr_t'(32'h1000 + 4 * $urandom_range(0, 4000)) : pc + 4;
        i++;
      end
    end
  end

  // storage side: random acceptance and way choice, changed at each falling edge
  int pos = 0;
  always @(negedge clk) begin
    wr_ready <= ($urandom_range(0, 3) != 0);
    wr_way   <= way_t'($urandom_range(0, 3));
  end

  // driver: hold an instruction until accepted
  initial begin
    ret_pc = '0; ret_instr = '0; ret_ctrl = 0; ret_cond = 0; ret_taken = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NI; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin ret_valid = 0; @(negedge clk); end
      ret_valid = 1; ret_pc = p_pc[i]; ret_instr = p_ins[i];
      ret_ctrl = p_ctrl[i]; ret_cond = p_cond[i]; ret_taken = p_tkn[i];
      forever begin
        bit acc;
        #2 acc = ret_ready;
        @(posedge clk);
        if (acc) break;
        @(negedge clk);
      end
    end
    @(negedge clk);
    ret_valid = 0;
    repeat (20) @(posedge clk);
    chk("all instructions written", pos, NI);
    chk("traces", n_traces, blk_end.size() / NBLK);
    chk("coverage", n_cut > 0 && n_uncond > 0, 1);
    $display("blocks %0d (cut at 16: %0d, unconditional end: %0d), traces %0d", blk_end.size(), n_cut, n_uncond, n_traces);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: looks at the write port shortly after each falling edge, when
  // everything for the coming rising edge is settled
  way_t cur_way;
  always @(negedge clk) begin
   #2;
   if (rst_n && wr_valid && wr_ready) begin
    if (wr_req.kind == WR_INSTR) begin
      chk("addr", wr_req.addr, p_pc[pos]);
      chk("data", wr_req.data, p_ins[pos]);
      chk("first", wr_req.first, p_first[pos]);
      if (p_first[pos]) begin
        blk_way.push_back(wr_way);
        cur_way = wr_way;
      end else chk("way", wr_req.way, cur_way);
      pos++;
    end else begin
      int b0;
      b0 = n_traces * NBLK;
      for (int b = 0; b < NBLK; b++) begin
        chk("head", wr_req.trace.head[b], p_pc[blk_start[b0 + b]]);
        chk("tail", wr_req.trace.tail[b], p_pc[blk_end[b0 + b]]);
        chk("tway", wr_req.trace.way[b], blk_way[b0 + b]);
        if (b < NBLK - 1) chk("br", wr_req.trace.br[b], blk_br[b0 + b]);
      end
      chk("valid", wr_req.trace.valid, 1);
      n_traces++;
    end
   end
  end
endmodule
