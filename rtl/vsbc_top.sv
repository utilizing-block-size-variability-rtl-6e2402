// vsbc_top: multi-threaded Variable-Sized Block Cache (VSBC) fetch system.
//
// Per thread: a trace build engine fed by the executed-instruction stream, a
// coalescing buffer and a fetch mux. Shared: the VSBC storage module with the
// block pointer cache (BPC, NBPC lines split evenly among the threads) and the
// basic block cache (BBC, BBC_BYTES of 4-byte instructions in WAYS ways). The
// branch predictors, BTBs, instruction cache and execution engine are outside
// this design: the predictions arrive with each lookup (lk_pred), instruction
// cache lines arrive on ic_*, and the execution engine takes ex_* and returns
// the executed instructions on ret_*.
//
// Fetch: a thread presents a fetch address and three predicted branch
// outcomes on lk_*; lk_ready is high in the cycle the request is accepted (not
// while the thread's coalescing buffer is still delivering). Two cycles after
// acceptance resp_valid reports hit or miss and, on a hit, the packed trace
// starts to leave through ex_* at DELIVER_W instructions per cycle; the thread
// is then in trace delivery mode (mode = 1). On a miss the thread returns to
// trace assembly mode and the fetch mux passes instruction cache lines.
// Build: every executed instruction is written into the BBC and every fourth
// completed basic block closes a trace in the BPC (see trace_build_engine).
// Synchronous, active-low reset.
//
// Default sizes: two threads and four BBC ways as in the design's block
// diagram, 512 BPC lines, a 4 KB BBC (one of the evaluated sizes) and 16
// instructions per cycle delivered.
module vsbc_top
  import vsbc_pkg::*;
#(
  parameter int unsigned NTH       = 2,
  parameter int unsigned NBPC      = 512,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned BBC_BYTES = 4096,
  parameter int unsigned DELIVER_W = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // trace lookup (from the thread's fetch unit and branch predictor)
  input  logic   [NTH-1:0]              lk_valid,
  input  addr_t  [NTH-1:0]              lk_addr,
  input  logic   [NTH-1:0][NBLK-2:0]    lk_pred,
  output logic   [NTH-1:0]              lk_ready,
  output logic   [NTH-1:0]              resp_valid,
  output logic   [NTH-1:0]              resp_hit,
  output logic   [NTH-1:0]              resp_partial,
  output logic   [NTH-1:0][CNTW-1:0]    resp_len,
  // executed-instruction stream (from the execution engine)
  input  logic   [NTH-1:0]              ret_valid,
  input  addr_t  [NTH-1:0]              ret_pc,
  input  instr_t [NTH-1:0]              ret_instr,
  input  logic   [NTH-1:0]              ret_ctrl,
  input  logic   [NTH-1:0]              ret_cond,
  input  logic   [NTH-1:0]              ret_taken,
  output logic   [NTH-1:0]              ret_ready,
  // instruction cache lines
  input  logic   [NTH-1:0]                               ic_valid,
  input  logic   [NTH-1:0][$clog2(DELIVER_W+1)-1:0]      ic_count,
  input  instr_t [NTH-1:0][DELIVER_W-1:0]                ic_instr,
  // to the decoder / execution engine
  output logic   [NTH-1:0]                               ex_valid,
  output logic   [NTH-1:0]                               ex_vsbc,
  output logic   [NTH-1:0][$clog2(DELIVER_W+1)-1:0]      ex_count,
  output instr_t [NTH-1:0][DELIVER_W-1:0]                ex_instr,
  output logic   [NTH-1:0]                               ex_last,
  // operating mode: 1 = trace delivery, 0 = trace assembly
  output logic   [NTH-1:0]                               mode
);
  localparam int unsigned LINES = BBC_BYTES / 4 / WAYS;
  localparam int unsigned OCW   = $clog2(DELIVER_W + 1);

  logic    [NTH-1:0] cb_busy, st_lk_valid;
  logic    [NTH-1:0] wr_valid, wr_ready;
  wr_req_t [NTH-1:0] wr_req;
  way_t              wr_way;
  logic              res_valid;
  lk_res_t           res;
  instr_t  [WAYS-1:0][NBLK-1:0][PORT_W-1:0] res_data;

  assign st_lk_valid = lk_valid & ~cb_busy;

  vsbc_storage #(.NTH(NTH), .NBPC(NBPC), .WAYS(WAYS), .LINES(LINES)) u_storage (
    .clk, .rst_n,
    .lk_valid (st_lk_valid),
    .lk_addr,
    .lk_pred,
    .lk_ready,
    .wr_valid,
    .wr_req,
    .wr_ready,
    .wr_way,
    .res_valid,
    .res,
    .res_data,
    .mode
  );

  for (genvar t = 0; t < NTH; t++) begin : g_thr
    logic            vs_valid, vs_last;
    logic [OCW-1:0]  vs_count;
    instr_t [DELIVER_W-1:0] vs_instr;

    trace_build_engine u_tbe (
      .clk, .rst_n,
      .ret_valid(ret_valid[t]),
      .ret_pc   (ret_pc[t]),
      .ret_instr(ret_instr[t]),
      .ret_ctrl (ret_ctrl[t]),
      .ret_cond (ret_cond[t]),
      .ret_taken(ret_taken[t]),
      .ret_ready(ret_ready[t]),
      .wr_valid (wr_valid[t]),
      .wr_req   (wr_req[t]),
      .wr_ready (wr_ready[t]),
      .wr_way
    );

    coalescing_buffer #(.WAYS(WAYS), .DELIVER_W(DELIVER_W), .TID(t)) u_cb (
      .clk, .rst_n,
      .res_valid,
      .res,
      .res_data,
      .resp_valid  (resp_valid[t]),
      .resp_hit    (resp_hit[t]),
      .resp_partial(resp_partial[t]),
      .resp_len    (resp_len[t]),
      .out_valid   (vs_valid),
      .out_count   (vs_count),
      .out_instr   (vs_instr),
      .out_last    (vs_last),
      .busy        (cb_busy[t])
    );

    fetch_mux #(.W(DELIVER_W)) u_mux (
      .mode    (mode[t]),
      .vs_valid,
      .vs_count,
      .vs_instr,
      .ic_valid(ic_valid[t]),
      .ic_count(ic_count[t]),
      .ic_instr(ic_instr[t]),
      .ex_valid(ex_valid[t]),
      .ex_vsbc (ex_vsbc[t]),
      .ex_count(ex_count[t]),
      .ex_instr(ex_instr[t])
    );
    assign ex_last[t] = mode[t] && vs_last;
  end
endmodule
