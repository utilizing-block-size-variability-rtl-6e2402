// tb_coalescing_buffer: self-checking test of the coalescing buffer.
// Random lookup results are presented: a random number of blocks, each with a
// random way and length, over random data in all ways and ports, plus misses
// and results addressed to another thread (which must be ignored). The
// expected instruction stream is the selected way's port data of each block,
// concatenated. The test checks the response fields, that delivery starts the
// cycle after the result, carries 16 instructions per cycle (fewer in the
// last cycle) and takes ceil(length/16) cycles, and every delivered word.
module tb_coalescing_buffer;
  import vsbc_pkg::*;
  localparam int unsigned WAYS = 4, DW = 16, TID = 1;
  logic clk = 0, rst_n = 0;
  logic res_valid = 0;
  lk_res_t res;
  instr_t [WAYS-1:0][NBLK-1:0][PORT_W-1:0] res_data;
  logic resp_valid, resp_hit, resp_partial, out_valid, out_last, busy;
  logic [CNTW-1:0] resp_len;
  logic [$clog2(DW+1)-1:0] out_count;
  instr_t [DW-1:0] out_instr;

  int checks = 0, failures = 0, multi = 0;

  coalescing_buffer #(.WAYS(WAYS), .DELIVER_W(DW), .TID(TID)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endfunction

  initial begin
    instr_t exp_q[$];
    res = '0; res_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int nb, tid, cyc;
      bit hit;
      @(negedge clk);
      tid = ($urandom_range(0, 4) == 0) ? 0 : TID;
      hit = ($urandom_range(0, 5) != 0);
      nb  = hit ? $urandom_range(1, NBLK) : 0;
      for (int w = 0; w < WAYS; w++) for (int j = 0; j < NBLK; j++) for (int i = 0; i < PORT_W; i++)
        res_data[w][j][i] = $urandom;
      res = '0;
      res.tid = tid_t'(tid); res.hit = hit; res.partial = hit && nb < NBLK; res.nblk = NBW'(nb);
      exp_q.delete();
      for (int j = 0; j < NBLK; j++) begin
        res.way[j] = way_t'($urandom_range(0, WAYS - 1));
        res.len[j] = (j < nb) ? LENW'($urandom_range(1, PORT_W)) : '0;
        for (int i = 0; i < int'(res.len[j]); i++) exp_q.push_back(res_data[res.way[j]][j][i]);
      end
      res_valid = 1;
      @(negedge clk);
      res_valid = 0; res_data = '0;   // the buffer must hold its own copy
      chk("resp_valid", resp_valid, tid == TID);
      if (tid != TID) begin
        chk("no delivery for another thread", out_valid, 0);
        continue;
      end
      chk("resp_hit", resp_hit, hit);
      chk("resp_partial", resp_partial, hit && nb < NBLK);
      chk("resp_len", resp_len, exp_q.size());
      cyc = 0;
      while (exp_q.size() > 0) begin
        int c;
        c = exp_q.size() > DW ? DW : exp_q.size();
        chk("out_valid", out_valid, 1);
        chk("busy", busy, 1);
        chk("out_count", out_count, c);
        chk("out_last", out_last, exp_q.size() <= DW);
        for (int i = 0; i < c; i++) chk("word", out_instr[i], exp_q.pop_front());
        cyc++;
        @(negedge clk);
      end
      if (cyc > 1) multi++;
      chk("idle after delivery", out_valid || busy, 0);
    end
    chk("multi-cycle deliveries seen", multi > 0, 1);
    $display("multi-cycle deliveries: %0d", multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
