// rr_arbiter: round-robin arbiter for the VSBC storage module.
//
// The storage module serves one request per cycle; when several lookup and
// write requesters ask in the same cycle they are served in round-robin order,
// as the design requires. The requester after the last one granted has the
// highest priority in the next cycle. gnt is one-hot (or zero when nothing is
// requested) and combinational from req; the priority pointer moves on the
// clock edge after a grant. Reset is synchronous and active low. The pointer mechanism is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr;   // requester with highest priority
  logic [PW-1:0] sel;

  always_comb begin
    gnt = '0;
    sel = ptr;
    for (int unsigned k = 0; k < N; k++) begin
      logic [PW-1:0] idx;
      idx = PW'((int'(ptr) + k) % N);
      if (gnt == '0 && req[idx]) begin
        gnt[idx] = 1'b1;
        sel      = idx;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          ptr <= '0;
    else if (|req)       ptr <= (int'(sel) == N - 1) ? '0 : PW'(sel + 1'b1);
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (|req) |-> (|gnt));
endmodule
