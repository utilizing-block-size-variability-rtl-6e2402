// tb_fetch_mux: self-checking test of the per-thread fetch mux.
// Random VSBC and instruction-cache inputs are applied with both modes; the
// outputs must follow the VSBC side in delivery mode and the instruction
// cache side in assembly mode, with the count forced to zero when the chosen
// side is not valid.
module tb_fetch_mux;
  import vsbc_pkg::*;
  localparam int unsigned W = 16;
  logic mode, vs_valid, ic_valid, ex_valid, ex_vsbc;
  logic [$clog2(W+1)-1:0] vs_count, ic_count, ex_count;
  instr_t [W-1:0] vs_instr, ic_instr, ex_instr;
  int checks = 0, failures = 0;

  fetch_mux #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      mode = 1'($urandom); vs_valid = 1'($urandom); ic_valid = 1'($urandom);
      vs_count = 5'($urandom_range(1, W)); ic_count = 5'($urandom_range(1, W));
      for (int i = 0; i < W; i++) begin vs_instr[i] = $urandom; ic_instr[i] = $urandom; end
      #1;
      checks += 4;
      if (ex_vsbc !== mode) failures++;
      if (ex_valid !== (mode ? vs_valid : ic_valid)) failures++;
      if (ex_count !== (mode ? (vs_valid ? vs_count : 0) : (ic_valid ? ic_count : 0))) failures++;
      if (ex_instr !== (mode ? vs_instr : ic_instr)) failures++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
