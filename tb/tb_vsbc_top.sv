// tb_vsbc_top: end-to-end test of the VSBC fetch system at its default sizes
// (2 threads, 512 BPC lines, 4 KB 4-way BBC, 16 instructions per cycle).
//
// Each thread runs a synthetic program: a chain of phases laid out one after
// the other in memory, each a loop over a few dozen basic blocks of 1..24
// instructions with forward conditional branches and jumps whose outcomes
// follow per-block periodic patterns; the loop-back branch of a phase falls
// through into the next phase after a number of iterations. Both threads use
// the same address range with different instruction words, so they compete
// for the shared BBC. The dynamic path of each thread is generated up front.
//
// Per thread, three processes play the rest of the processor:
//  - fetch: asks the VSBC for a trace at the current path position with the
//    exact branch outcomes of the next three stored blocks (a perfect branch
//    predictor); on a hit it moves on by the delivered length at once (its
//    next lookup then waits for the coalescing buffer); on a miss it supplies
//    one instruction-cache line (the instructions up to the end of the
//    current block, at most 16) through the fetch mux;
//  - monitor: checks every instruction reaching the execution engine, in
//    order, against the path, and the delivery rate (16 per cycle except the
//    last cycle of a trace) and the two-cycle lookup latency;
//  - retire: feeds the delivered instructions back as the executed stream,
//    with random gaps, which builds traces in the VSBC.
// At the end every mechanism is counted and each one that never happened is
// a failure: full, partial and mid-trace hits, misses, both mode switches,
// BPC eviction and rewrite, a trace cut by overwritten BBC lines, blocks
// closed at 16 instructions, arbitration conflicts, lookups held by a busy
// coalescing buffer, multi-cycle deliveries and a stalled executed stream.
module tb_vsbc_top;
  import vsbc_pkg::*;
  localparam int unsigned NTH = 2, DW = 16;
  localparam int NI = 30000;          // path length per thread (instructions)

  logic clk = 0, rst_n = 0;
  logic   [NTH-1:0] lk_valid = '0, lk_ready, resp_valid, resp_hit, resp_partial;
  addr_t  [NTH-1:0] lk_addr;
  logic   [NTH-1:0][NBLK-2:0] lk_pred;
  logic   [NTH-1:0][CNTW-1:0] resp_len;
  logic   [NTH-1:0] ret_valid = '0, ret_ctrl, ret_cond, ret_taken, ret_ready;
  addr_t  [NTH-1:0] ret_pc;
  instr_t [NTH-1:0] ret_instr;
  logic   [NTH-1:0] ic_valid = '0;
  logic   [NTH-1:0][$clog2(DW+1)-1:0] ic_count;
  instr_t [NTH-1:0][DW-1:0] ic_instr;
  logic   [NTH-1:0] ex_valid, ex_vsbc, ex_last, mode;
  logic   [NTH-1:0][$clog2(DW+1)-1:0] ex_count;
  instr_t [NTH-1:0][DW-1:0] ex_instr;

  vsbc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;

  initial begin
    #3000000;   // 300,000 clock cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("%0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endfunction

  function automatic instr_t iword(addr_t a, int t); return instr_t'(a * 32'h9E37_79B1 ^ (t + 1) * 32'h7F4A_7C15); endfunction

  // ---- dynamic paths --------------------------------------------------------
  addr_t p_pc   [NTH][NI];
  bit    p_ctrl [NTH][NI], p_cond [NTH][NI], p_tkn [NTH][NI];
  bit    p_sst  [NTH][NI];   // first instruction of a stored block
  bit    p_send [NTH][NI];   // last instruction of a stored block
  bit    p_st   [NTH][NI];   // branch status recorded at a stored block end

  task automatic gen_path(int t);
    localparam int NBP = 24;        // blocks per phase
    int     len [NBP], tgt [NBP], per [NBP], cnt [NBP];
    bit     jmp [NBP];
    addr_t  base [NBP + 1];
    int i, b, iter, iters, sl;
    addr_t pbase;
    pbase = 32'h0001_0000;
    i = 0; sl = 0;
    while (i < NI) begin
      // a new phase
      base[0] = pbase;
      for (int k = 0; k < NBP; k++) begin
        len[k] = $urandom_range(1, 24);
        base[k + 1] = base[k] + addr_t'(4 * len[k]);
        tgt[k] = (k + 2 < NBP) ? $urandom_range(k + 2, (k + 5 < NBP - 1) ? k + 5 : NBP - 1) : NBP - 1;
        per[k] = $urandom_range(1, 4);
        jmp[k] = ($urandom_range(0, 7) == 0);
        cnt[k] = 0;
      end
      iters = $urandom_range(8, 30);
      iter = 0; b = 0;
      while (i < NI) begin
        int nb;
        for (int k = 0; k < len[b] && i < NI; k++) begin
          p_pc[t][i] = base[b] + addr_t'(4 * k);
          p_ctrl[t][i] = (k == len[b] - 1);
          p_cond[t][i] = p_ctrl[t][i] && (b == NBP - 1 || !jmp[b]);
          p_tkn[t][i] = 0;
          i++;
        end
        if (i >= NI && p_ctrl[t][i-1] == 0) break;
        if (b == NBP - 1) begin
          iter++;
          p_tkn[t][i-1] = (iter < iters);
          if (iter < iters) nb = 0;
          else break;                       // fall through into the next phase
        end else if (jmp[b]) begin
          p_tkn[t][i-1] = 1; nb = tgt[b];
        end else begin
          p_tkn[t][i-1] = (cnt[b] % per[b]) == 0;
          nb = p_tkn[t][i-1] ? tgt[b] : b + 1;
        end
        cnt[b]++;
        b = nb;
      end
      pbase = base[NBP];
    end
    // stored-block split, as the trace build engine does it
    sl = 0;
    for (int k = 0; k < NI; k++) begin
      p_sst[t][k] = (sl == 0);
      p_send[t][k] = p_ctrl[t][k] || sl == PORT_W - 1;
      p_st[t][k] = p_ctrl[t][k] ? (p_cond[t][k] ? p_tkn[t][k] : 1'b1) : 1'b0;
      sl = p_send[t][k] ? 0 : sl + 1;
    end
  endtask

  // ---- per-thread processes ---------------------------------------------------
  int fpos [NTH], mpos [NTH], rpos [NTH];
  bit done [NTH];
  int n_full = 0, n_partial = 0, n_miss = 0, n_multi = 0;

  task automatic fetch(int t);
    bit follow;   // previous lookup delivered a long trace: ask again at once
    fpos[t] = 0; follow = 0;
    while (fpos[t] < NI - 80) begin
      logic [NBLK-2:0] p;
      int n, k, lat;
      // fetch runs at most 160 instructions ahead of the executed stream,
      // except right after a long trace, to overlap the lookup with delivery
      while (!follow && fpos[t] - rpos[t] > 160) @(negedge clk);
      follow = 0;
      p = '0; n = 0; k = fpos[t];
      while (n < NBLK - 1) begin
        if (p_send[t][k]) begin p[n] = p_st[t][k]; n++; end
        k++;
      end
      @(negedge clk);
      lk_valid[t] = 1; lk_addr[t] = p_pc[t][fpos[t]]; lk_pred[t] = p;
      forever begin
        bit acc;
        #2 acc = lk_ready[t];
        @(posedge clk);
        if (acc) break;
        @(negedge clk);
      end
      @(negedge clk);
      lk_valid[t] = 0;
      lat = 1;
      #2;
      while (!resp_valid[t]) begin @(negedge clk); #2; lat++; end
      chk("lookup latency (cycles)", lat, 2);
      if (resp_hit[t]) begin
        int mx, s;
        chk("delivery starts with the response", ex_valid[t] && ex_vsbc[t], 1);
        // at most the next four stored blocks
        mx = 0; s = 0;
        for (int j = fpos[t]; s < NBLK; j++) begin mx++; if (p_send[t][j]) s++; end
        chk("trace within four blocks", resp_len[t] <= mx && resp_len[t] > 0, 1);
        if (resp_partial[t]) n_partial++; else n_full++;
        if (resp_len[t] > DW) begin n_multi++; follow = 1; end
        fpos[t] += resp_len[t];
      end else begin
        int c;
        chk("assembly mode after a miss", mode[t], 0);
        n_miss++;
        c = 0;
        for (int j = fpos[t]; c < DW; j++) begin
          ic_instr[t][c] = iword(p_pc[t][j], t); c++;
          if (p_send[t][j]) break;
        end
        ic_valid[t] = 1; ic_count[t] = 5'(c);
        @(negedge clk);
        ic_valid[t] = 0;
        fpos[t] += c;
      end
    end
    while (mpos[t] < fpos[t]) @(negedge clk);
    done[t] = 1;
  endtask

  task automatic monitor(int t);
    mpos[t] = 0;
    forever begin
      @(negedge clk); #3;
      if (ex_valid[t]) begin
        if (ex_vsbc[t] && !ex_last[t]) chk("16 instructions per cycle", ex_count[t], DW);
        for (int i = 0; i < int'(ex_count[t]); i++)
          chk("instruction to execution engine", ex_instr[t][i], iword(p_pc[t][mpos[t] + i], t));
        mpos[t] += ex_count[t];
      end
    end
  endtask

  int n_ret_stall = 0;
  task automatic retire(int t);
    rpos[t] = 0;
    forever begin
      @(negedge clk);
      while (rpos[t] >= mpos[t] || $urandom_range(0, 7) == 0) begin
        ret_valid[t] = 0; @(negedge clk);
      end
      ret_valid[t] = 1; ret_pc[t] = p_pc[t][rpos[t]]; ret_instr[t] = iword(p_pc[t][rpos[t]], t);
      ret_ctrl[t] = p_ctrl[t][rpos[t]]; ret_cond[t] = p_cond[t][rpos[t]]; ret_taken[t] = p_tkn[t][rpos[t]];
      forever begin
        bit acc;
        #2 acc = ret_ready[t];
        @(posedge clk);
        if (acc) break;
        n_ret_stall++;
        @(negedge clk);
      end
      rpos[t]++;
    end
  endtask

  // ---- mechanism counters (observed inside the design) ----------------------
  int n_mid = 0, n_to_dlv = 0, n_to_asm = 0, n_evict = 0, n_merge = 0, n_clobber = 0;
  int n_cut16 = 0, n_conflict = 0, n_busy = 0, n_traces = 0;
  logic [NTH-1:0] mode_q = '0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_storage.s1_valid && dut.u_storage.res.hit && dut.u_storage.s1_start != 0) n_mid++;
    if (dut.u_storage.s1_valid && dut.u_storage.s1_hit && dut.u_storage.res.nblk < dut.u_storage.s1_nblk) n_clobber++;
    if (dut.u_storage.u_bpc.ins_en) n_traces++;
    if (dut.u_storage.u_bpc.ins_evict) n_evict++;
    if (dut.u_storage.u_bpc.ins_merge) n_merge++;
    if ($countones(dut.u_storage.req) > 1) n_conflict++;
    for (int t = 0; t < NTH; t++) begin
      if (mode[t] && !mode_q[t]) n_to_dlv++;
      if (!mode[t] && mode_q[t]) n_to_asm++;
      if (lk_valid[t] && dut.cb_busy[t]) n_busy++;
    end
    if (dut.g_thr[0].u_tbe.acc && dut.g_thr[0].u_tbe.blk_end && !dut.g_thr[0].u_tbe.ret_ctrl) n_cut16++;
    if (dut.g_thr[1].u_tbe.acc && dut.g_thr[1].u_tbe.blk_end && !dut.g_thr[1].u_tbe.ret_ctrl) n_cut16++;
    mode_q <= mode;
  end

  function automatic void seen(string what, int n);
    $display("  %-40s %0d", what, n);
    chk(what, n > 0, 1);
  endfunction

  initial begin
    lk_addr = '0; lk_pred = '0; ret_pc = '0; ret_instr = '0; ret_ctrl = '0; ret_cond = '0; ret_taken = '0;
    ic_count = '0; ic_instr = '0;
    for (int t = 0; t < NTH; t++) begin gen_path(t); done[t] = 0; mpos[t] = 0; rpos[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      monitor(0); monitor(1); retire(0); retire(1); fetch(0); fetch(1);
    join_none
    wait (done[0] && done[1]);
    repeat (4) @(negedge clk);
    $display("cycles %0d, lookups: full hits %0d, partial hits %0d, misses %0d", cycles, n_full, n_partial, n_miss);
    $display("trace miss rate %0.1f%%, average delivered trace length %0.1f instructions",
             100.0 * n_miss / (n_full + n_partial + n_miss),
             real'(fpos[0] + fpos[1] - 0) / (n_full + n_partial + n_miss));
    $display("mechanisms:");
    seen("full trace hits", n_full);
    seen("partial trace hits", n_partial);
    seen("trace misses", n_miss);
    seen("hits starting at a later block of a trace", n_mid);
    seen("switches to trace delivery mode", n_to_dlv);
    seen("switches to trace assembly mode", n_to_asm);
    seen("traces written to the BPC", n_traces);
    seen("BPC LRU evictions", n_evict);
    seen("BPC rewrites of a stored trace", n_merge);
    seen("traces cut by overwritten BBC lines", n_clobber);
    seen("blocks closed at 16 instructions", n_cut16);
    seen("arbitration conflicts", n_conflict);
    seen("lookups held by a busy coalescing buffer", n_busy);
    seen("multi-cycle trace deliveries", n_multi);
    seen("executed-stream stalls", n_ret_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
