// fetch_mux: per-thread source select in front of the execution engine.
//
// In trace delivery mode (mode = 1) the thread's instructions come from its
// VSBC coalescing buffer; in trace assembly mode (mode = 0) they come from the
// conventional instruction cache, one line at a time. The mux is purely
// combinational: the selected source's valid, count and instruction slots
// appear on the ex_* outputs in the same cycle, ex_vsbc tells which source was
// chosen. The mux itself is named in the design's block diagram (one per
// thread); switching it by the operating mode is this design's reading of it.
module fetch_mux
  import vsbc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                     mode,
  input  logic                     vs_valid,
  input  logic [$clog2(W+1)-1:0]   vs_count,
  input  instr_t [W-1:0]           vs_instr,
  input  logic                     ic_valid,
  input  logic [$clog2(W+1)-1:0]   ic_count,
  input  instr_t [W-1:0]           ic_instr,
  output logic                     ex_valid,
  output logic                     ex_vsbc,
  output logic [$clog2(W+1)-1:0]   ex_count,
  output instr_t [W-1:0]           ex_instr
);
  always_comb begin
    ex_vsbc = mode;
    if (mode) begin
      ex_valid = vs_valid;
      ex_count = vs_valid ? vs_count : '0;
      ex_instr = vs_instr;
    end else begin
      ex_valid = ic_valid;
      ex_count = ic_valid ? ic_count : '0;
      ex_instr = ic_instr;
    end
  end
endmodule
