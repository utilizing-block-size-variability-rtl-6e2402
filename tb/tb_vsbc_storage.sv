// tb_vsbc_storage: self-checking test of the VSBC storage module (round-robin
// arbiter, block pointer cache and basic block cache together), with 2
// threads, 8 BPC lines, 2 BBC ways of 64 lines.
// Directed sequence: thread 0 stores four basic blocks and their trace; then
// lookups check a full hit (result one cycle after acceptance, four blocks,
// lengths, ways and the instruction words in the recorded ways), a hit that
// starts at the third block, a hit cut short by a mispredicted branch, a miss
// for the other thread (dedicated BPC lines) and a miss on an unknown
// address, with the mode of each thread following. Thread 1 then overwrites
// the BBC lines of thread 0's third block, and the next lookup of thread 0
// must stop before that block. Finally both threads request in the same
// cycles and must be served alternately.
module tb_vsbc_storage;
  import vsbc_pkg::*;
  localparam int unsigned NTH = 2, NBPC = 8, WAYS = 2, LINES = 64;
  logic clk = 0, rst_n = 0;
  logic  [NTH-1:0] lk_valid = '0, lk_ready, wr_valid = '0, wr_ready, mode;
  addr_t [NTH-1:0] lk_addr;
  logic  [NTH-1:0][NBLK-2:0] lk_pred;
  wr_req_t [NTH-1:0] wr_req;
  way_t wr_way;
  logic res_valid;
  lk_res_t res;
  instr_t [WAYS-1:0][NBLK-1:0][PORT_W-1:0] res_data;

  int checks = 0, failures = 0;

  vsbc_storage #(.NTH(NTH), .NBPC(NBPC), .WAYS(WAYS), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endfunction

  function automatic instr_t iword(addr_t a, int t); return instr_t'(a * 7 + t * 32'h0100_0001); endfunction

  // one write request, held until accepted; returns the way reported in that cycle
  task automatic write(int t, wr_req_t r, output way_t w);
    @(negedge clk);
    wr_valid[t] = 1; wr_req[t] = r;
    forever begin
      bit acc;
      #2 acc = wr_ready[t]; w = wr_way;
      @(posedge clk);
      if (acc) break;
      @(negedge clk);
    end
    @(negedge clk);
    wr_valid[t] = 0;
  endtask

  task automatic store_block(int t, addr_t head, int len, output way_t w);
    for (int i = 0; i < len; i++) begin
      wr_req_t r;
      way_t got;
      r = '0; r.kind = WR_INSTR; r.addr = head + addr_t'(4 * i); r.data = iword(r.addr, t);
      r.first = (i == 0); r.way = w;
      write(t, r, got);
      if (i == 0) w = got;
    end
  endtask

  // one lookup; waits for its result, checks the one-cycle result latency
  lk_res_t got_res;
  instr_t [WAYS-1:0][NBLK-1:0][PORT_W-1:0] got_data;
  task automatic lookup(int t, addr_t a, logic [NBLK-2:0] p);
    @(negedge clk);
    lk_valid[t] = 1; lk_addr[t] = a; lk_pred[t] = p;
    forever begin
      bit acc;
      #2 acc = lk_ready[t];
      @(posedge clk);
      if (acc) break;
      @(negedge clk);
    end
    @(negedge clk);
    lk_valid[t] = 0;
    #2;
    chk("result one cycle after acceptance", res_valid && res.tid == tid_t'(t), 1);
    got_res = res; got_data = res_data;
    @(posedge clk); #1;
    chk("mode follows hit", mode[t], got_res.hit);
  endtask

  addr_t heads [NBLK] = '{32'h0000_1000, 32'h0000_1020, 32'h0000_1080, 32'h0000_10c0};
  int    lens  [NBLK] = '{5, 16, 3, 9};
  way_t  ways  [NBLK];

  task automatic check_blocks(int first_blk, int n);
    chk("nblk", got_res.nblk, n);
    for (int j = 0; j < n; j++) begin
      chk("len", got_res.len[j], lens[first_blk + j]);
      chk("way", got_res.way[j], ways[first_blk + j]);
      for (int i = 0; i < lens[first_blk + j]; i++)
        chk("data", got_data[ways[first_blk + j]][j][i], iword(heads[first_blk + j] + addr_t'(4 * i), 0));
    end
  endtask

  initial begin
    wr_req_t r;
    way_t dummy;
    lk_addr = '0; lk_pred = '0; wr_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // build one trace for thread 0: branch status taken, not taken, taken
    for (int b = 0; b < NBLK; b++) store_block(0, heads[b], lens[b], ways[b]);
    r = '0; r.kind = WR_TRACE; r.trace.valid = 1;
    for (int b = 0; b < NBLK; b++) begin
      r.trace.head[b] = heads[b]; r.trace.tail[b] = heads[b] + addr_t'(4 * (lens[b] - 1)); r.trace.way[b] = ways[b];
    end
    r.trace.br = 3'b101;
    write(0, r, dummy);

    lookup(0, heads[0], 3'b101);
    chk("full hit", got_res.hit && !got_res.partial, 1);
    check_blocks(0, 4);

    lookup(0, heads[2], 3'b001);
    chk("hit from block 2", got_res.hit && !got_res.partial, 1);
    check_blocks(2, 2);

    lookup(0, heads[0], 3'b111);   // second branch mispredicted
    chk("partial hit", got_res.hit && got_res.partial, 1);
    check_blocks(0, 2);

    lookup(1, heads[0], 3'b101);
    chk("other thread misses", got_res.hit, 0);
    lookup(0, 32'h0000_3000, 3'b101);
    chk("unknown address misses", got_res.hit, 0);

    // thread 1 fills every way at the index of thread 0's third block
    for (int k = 1; k <= 2 * WAYS; k++) store_block(1, heads[2] + addr_t'(k * 4 * LINES), 1, dummy);
    lookup(0, heads[0], 3'b101);
    chk("clobbered block cuts the trace", got_res.hit && got_res.partial, 1);
    check_blocks(0, 2);

    // both threads request together: they must be granted alternately
    @(negedge clk);
    lk_valid = '1; lk_addr[0] = heads[0]; lk_addr[1] = heads[0]; lk_pred = '0;
    wr_valid = '1; wr_req[0] = '0; wr_req[1] = '0;
    wr_req[0].addr = 32'h5000; wr_req[1].addr = 32'h6000; wr_req[0].first = 1; wr_req[1].first = 1;
    begin
      int last, served[4], run;
      last = -1; run = 0;
      for (int c = 0; c < 16; c++) begin
        int g;
        #2;
        g = -1;
        for (int t = 0; t < NTH; t++) begin
          if (lk_ready[t]) begin chk("one grant", g, -1); g = 2 * t; end
          if (wr_ready[t]) begin chk("one grant", g, -1); g = 2 * t + 1; end
        end
        chk("someone granted", g >= 0, 1);
        if (g >= 0) begin
          served[g]++;
          chk("no requester served twice in a row", g != last, 1);
          last = g;
        end
        @(negedge clk);
      end
      for (int r2 = 0; r2 < 4; r2++) chk("all requesters served", served[r2] > 0, 1);
    end
    lk_valid = '0; wr_valid = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
