// switch_allocator: separable input-first allocation of crossbar time slots.
//
// Stage 1, per input port: a round-robin arbiter picks one of the VCs that
// request (the VC is active, has a flit and its downstream VC has a credit).
// Stage 2, per output port: a round-robin arbiter picks one of the inputs
// whose stage-1 winner wants that output. Winners get in_grant/in_vc and the
// crossbar gets out_valid/out_sel; the flit crosses at the next clock edge.
// Arbiter pointers move only on a final grant. One flit per input and per
// output per cycle. The separable round-robin form is this design's own
// choice; the text only names the unit.
module switch_allocator
  import pfc_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 64
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]             req,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0][PORT_W-1:0] port,
  output logic [NUM_PORTS-1:0]                         in_grant,
  output logic [NUM_PORTS-1:0][VC_W-1:0]               in_vc,
  output logic [NUM_PORTS-1:0]                         out_valid,
  output logic [NUM_PORTS-1:0][$clog2(NUM_PORTS)-1:0]  out_sel
);

  localparam int unsigned PI_W = $clog2(NUM_PORTS);

  logic [NUM_PORTS-1:0][VC_W-1:0]      s1_vc;
  logic [NUM_PORTS-1:0]                s1_any;
  logic [NUM_PORTS-1:0][PORT_W-1:0]    s1_port;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] s2_req, s2_gnt;
  logic [NUM_PORTS-1:0][PI_W-1:0]      s2_idx;
  logic [NUM_PORTS-1:0]                s2_any;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk (clk), .rst_n (rst_n), .req (req[i]), .advance (in_grant[i]),
      .grant (), .grant_idx (s1_vc[i]), .any (s1_any[i])
    );
    assign s1_port[i] = port[i][s1_vc[i]];
  end

  // Stage 2: each output port picks one of the inputs that chose it.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NUM_PORTS; i++)
        s2_req[o][i] = s1_any[i] && (s1_port[i] == PORT_W'(o));
    end

    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk (clk), .rst_n (rst_n), .req (s2_req[o]), .advance (1'b1),
      .grant (s2_gnt[o]), .grant_idx (s2_idx[o]), .any (s2_any[o])
    );
  end

  // An input is granted when any output picked it.
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_grant
    always_comb begin
      in_grant[i] = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++)
        if (s2_gnt[o][i]) in_grant[i] = 1'b1;
    end
  end

  assign in_vc     = s1_vc;
  assign out_valid = s2_any;
  assign out_sel   = s2_idx;

endmodule
