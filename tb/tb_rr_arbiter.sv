// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Random request patterns are applied for many cycles; a reference pointer
// model predicts the grant (first requester at or after the pointer) and the
// pointer moves past each grant. A fairness check confirms that with all
// requesters active each one is served once every N cycles.
module tb_rr_arbiter;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt, exp_gnt;
  int checks = 0, failures = 0;
  int unsigned ptr;
  int unsigned served [N];

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .gnt);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model(logic [N-1:0] r, int unsigned p, output int unsigned s);
    model = '0; s = p;
    for (int unsigned k = 0; k < N; k++)
      if (model == '0 && r[(p + k) % N]) begin model[(p + k) % N] = 1'b1; s = (p + k) % N; end
  endfunction

  initial begin
    int unsigned s;
    req = '0; ptr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      req = (c < 1000) ? N'($urandom) : '1;
      exp_gnt = model(req, ptr, s);
      #1;
      checks++;
      if (gnt !== exp_gnt) begin
        failures++;
        $display("cycle %0d req=%b gnt=%b expected %b", c, req, gnt, exp_gnt);
      end
      if (c >= 1000) served[s]++;
      if (req != '0) ptr = (s + 1) % N;
    end
    for (int unsigned i = 0; i < N; i++) begin
      checks++;
      if (served[i] != 1000 / N) begin failures++; $display("requester %0d served %0d", i, served[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
