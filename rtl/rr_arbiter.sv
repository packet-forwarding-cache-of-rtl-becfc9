// rr_arbiter: round-robin arbiter over N requesters.
//
// grant is one-hot (or zero when nothing requests) and is a combinational
// function of req and the priority pointer. When `advance` is high at a clock
// edge and a grant was given, the requester after the winner gets the highest
// priority next. Used by the input units and both allocators.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          req,
  input  logic                  advance,
  output logic [N-1:0]          grant,
  output logic [$clog2(N)-1:0]  grant_idx,
  output logic                  any
);

  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;
  logic [W-1:0] ptr;

  always_comb begin
    logic [W-1:0] c;
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int unsigned o = 0; o < N; o++) begin
      c = W'((int'(ptr) + o) % N);
      if (!any && req[c]) begin
        any       = 1'b1;
        grant[c]  = 1'b1;
        grant_idx = $clog2(N)'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              ptr <= '0;
    else if (advance && any) ptr <= W'((int'(grant_idx) + 1) % N);
  end

endmodule
