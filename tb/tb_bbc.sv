// tb_bbc: self-checking test of the basic block cache.
// A reference model (per way and line: valid, thread, address, instruction)
// is kept in the testbench. Random writes of blocks (first instruction, then
// the rest in the returned way) from two threads go to a small address range
// so that lines conflict; the way chosen for each block's first instruction
// is checked against the model's rule (same-thread hit, else invalid way,
// else round-robin victim). After every write all read ports of all ways are
// compared with the model: data of valid lines and the per-line hit flags.
module tb_bbc;
  import vsbc_pkg::*;
  localparam int unsigned WAYS = 4, LINES = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_first = 0;
  tid_t wr_tid = '0, rd_tid = '0;
  addr_t wr_addr = '0;
  instr_t wr_data = '0;
  way_t wr_way_in = '0, wr_way;
  addr_t [NBLK-1:0] rd_addr;
  instr_t [WAYS-1:0][NBLK-1:0][PORT_W-1:0] rd_data;
  logic [WAYS-1:0][NBLK-1:0][PORT_W-1:0] rd_hit;

  int checks = 0, failures = 0;
  int hits_seen = 0, evictions = 0;

  bit     m_valid [WAYS][LINES];
  int     m_tid   [WAYS][LINES];
  addr_t  m_addr  [WAYS][LINES];
  instr_t m_data  [WAYS][LINES];
  int     m_vptr;

  bbc #(.WAYS(WAYS), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(addr_t a); return int'((a >> 2) % LINES); endfunction

  function automatic int model_way(addr_t a, int t);
    for (int w = 0; w < WAYS; w++)
      if (m_valid[w][idx(a)] && m_tid[w][idx(a)] == t && m_addr[w][idx(a)] == a) return w;
    for (int w = 0; w < WAYS; w++)
      if (!m_valid[w][idx(a)]) return WAYS + w;   // marks an allocation
    return 2 * WAYS + m_vptr;
  endfunction

  task automatic write_block(addr_t head, int len, int t);
    int w;
    for (int i = 0; i < len; i++) begin
      addr_t a = head + addr_t'(4 * i);
      @(negedge clk);
      wr_en = 1; wr_tid = tid_t'(t); wr_addr = a; wr_data = $urandom;
      wr_first = (i == 0);
      if (i == 0) begin
        int mw = model_way(a, t);
        #1;
        checks++;
        if (int'(wr_way) != mw % WAYS) begin
          failures++; $display("way for %h: got %0d expected %0d", a, wr_way, mw % WAYS);
        end
        if (mw < WAYS) hits_seen++;
        else begin
          if (mw >= 2 * WAYS) evictions++;
          m_vptr = (m_vptr + 1) % WAYS;
        end
        w = mw % WAYS;
        wr_way_in = '0;
      end else wr_way_in = way_t'(w);
      m_valid[w][idx(a)] = 1; m_tid[w][idx(a)] = t; m_addr[w][idx(a)] = a; m_data[w][idx(a)] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic check_reads(int t);
    rd_tid = tid_t'(t);
    for (int j = 0; j < NBLK; j++) rd_addr[j] = addr_t'(32'h1000 + 4 * $urandom_range(0, 47));
    #1;
    for (int w = 0; w < WAYS; w++)
      for (int j = 0; j < NBLK; j++)
        for (int i = 0; i < PORT_W; i++) begin
          addr_t a = rd_addr[j] + addr_t'(4 * i);
          bit eh = m_valid[w][idx(a)] && m_tid[w][idx(a)] == t && m_addr[w][idx(a)] == a;
          checks++;
          if (rd_hit[w][j][i] !== eh || (eh && rd_data[w][j][i] !== m_data[w][idx(a)])) begin
            failures++;
            if (failures < 10) $display("read w%0d p%0d i%0d addr %h: hit %b/%b data %h/%h", w, j, i, a,
                                        rd_hit[w][j][i], eh, rd_data[w][j][i], m_data[w][idx(a)]);
          end
        end
  endtask

  initial begin
    m_vptr = 0;
    for (int j = 0; j < NBLK; j++) rd_addr[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_reads(0);
    for (int n = 0; n < 300; n++) begin
      write_block(addr_t'(32'h1000 + 4 * $urandom_range(0, 47)), $urandom_range(1, PORT_W), $urandom_range(0, 1));
      check_reads($urandom_range(0, 1));
    end
    checks++;
    if (hits_seen == 0 || evictions == 0) begin
      failures++; $display("coverage: hits %0d evictions %0d", hits_seen, evictions);
    end
    $display("block writes hitting an existing way: %0d, victim replacements: %0d", hits_seen, evictions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
