// tb_bpc: self-checking test of the block pointer cache.
// A small BPC (8 lines, 2 threads, 4 lines each) is driven with random trace
// inserts and lookups whose head addresses come from a small set, so that
// lookups match several lines, block positions and branch patterns, and the
// partitions fill up and evict. The testbench keeps its own copy of the
// lines and an MRU-to-LRU list per thread, places inserts by the same rules
// (same trace rewritten, else invalid line, else least recently used) and
// predicts every lookup: hit, delivered block count, start block and line.
module tb_bpc;
  import vsbc_pkg::*;
  localparam int unsigned NBPC = 8, NTH = 2, P = NBPC / NTH;
  logic clk = 0, rst_n = 0;
  logic lk_en = 0, ins_en = 0;
  tid_t lk_tid = '0;
  addr_t lk_addr = '0;
  logic [NBLK-2:0] lk_pred = '0;
  logic lk_hit, ins_merge, ins_evict;
  logic [NBW-1:0] lk_nblk;
  logic [1:0] lk_start;
  trace_t lk_trace, ins_trace;

  int checks = 0, failures = 0;
  int n_evict = 0, n_merge = 0, n_hit = 0, n_partial = 0, n_mid = 0;

  trace_t m_line [NBPC];
  int     order  [NTH][$];   // MRU first

  bpc #(.NBPC(NBPC), .NTH(NTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t rhead(); return addr_t'(32'h400 + 32'h40 * $urandom_range(0, 5)); endfunction

  function automatic void touch(int t, int l);
    foreach (order[t][i]) if (order[t][i] == l) begin order[t].delete(i); break; end
    order[t].push_front(l);
  endfunction

  function automatic void chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endfunction

  task automatic do_insert();
    trace_t tr;
    int t, tgt;
    bit merged, evict;
    t = $urandom_range(0, NTH - 1);
    tr = '0;
    tr.tid = tid_t'(t);
    tr.valid = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      tr.head[b] = rhead();
      tr.tail[b] = tr.head[b] + addr_t'(4 * $urandom_range(0, 15));
      tr.way[b]  = way_t'($urandom_range(0, 3));
    end
    tr.br = 3'($urandom);
    if ($urandom_range(0, 3) == 0) tr.head[0] = 32'h400;   // make rewrites likely
    if ($urandom_range(0, 1) == 0) tr.br = 3'b101;
    // model placement
    tgt = -1; merged = 0; evict = 0;
    for (int i = t * P; i < (t + 1) * P; i++)
      if (tgt < 0 && m_line[i].valid && m_line[i].head[0] == tr.head[0] && m_line[i].br == tr.br) begin
        tgt = i; merged = 1;
      end
    for (int i = t * P; i < (t + 1) * P; i++)
      if (tgt < 0 && !m_line[i].valid) tgt = i;
    if (tgt < 0) begin tgt = order[t][$]; evict = 1; end
    @(negedge clk);
    ins_en = 1; ins_trace = tr;
    #1;
    chk("ins_merge", ins_merge, merged);
    chk("ins_evict", ins_evict, evict);
    n_merge += merged; n_evict += evict;
    @(negedge clk);
    ins_en = 0;
    m_line[tgt] = tr;
    touch(t, tgt);
  endtask

  task automatic do_lookup();
    int t, best, bl, bk;
    t = $urandom_range(0, NTH - 1);
    @(negedge clk);
    lk_en = 1; lk_tid = tid_t'(t); lk_addr = rhead(); lk_pred = 3'($urandom);
    best = 0; bl = 0; bk = 0;
    for (int i = t * P; i < (t + 1) * P; i++) begin
      int k, n;
      k = -1;
      if (m_line[i].valid)
        for (int b = 0; b < NBLK; b++) if (k < 0 && m_line[i].head[b] == lk_addr) k = b;
      if (k >= 0) begin
        n = 1;
        for (int j = k; j < NBLK - 1; j++) begin
          if (m_line[i].br[j] != lk_pred[j - k]) break;
          n++;
        end
        if (n > best) begin best = n; bl = i; bk = k; end
      end
    end
    #1;
    chk("lk_hit", lk_hit, best > 0);
    chk("lk_nblk", lk_nblk, best);
    if (best > 0) begin
      chk("lk_start", lk_start, bk);
      chk("lk_trace", lk_trace == m_line[bl], 1);
      n_hit++;
      if (best < NBLK - bk) n_partial++;
      if (bk > 0) n_mid++;
    end
    @(negedge clk);
    lk_en = 0;
    if (best > 0) touch(t, bl);
  endtask

  initial begin
    ins_trace = '0;
    for (int i = 0; i < NBPC; i++) m_line[i] = '0;
    for (int t = 0; t < NTH; t++) for (int i = 0; i < P; i++) order[t].push_back(t * P + i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 2) == 0) do_insert();
      else do_lookup();
    end
    $display("hits %0d (from a later block %0d, cut by a branch %0d), rewrites %0d, evictions %0d",
             n_hit, n_mid, n_partial, n_merge, n_evict);
    chk("coverage", (n_hit > 0) && (n_mid > 0) && (n_partial > 0) && (n_merge > 0) && (n_evict > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
