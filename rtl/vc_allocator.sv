// vc_allocator: assigns a free virtual channel of the requested output port to
// input VCs holding a routed head flit.
//
// Every input VC (NUM_PORTS x NUM_VC of them) may request one output port.
// For each output port a round-robin arbiter picks one requester per cycle,
// provided the port has a free VC, and hands it the lowest-numbered free VC.
// The grant is combinational; the output unit marks the VC busy at the clock
// edge and frees it when the packet's tail flit leaves. At most one VC per
// output port is allocated per cycle. The allocator's structure is this
// design's own choice; the text only names the unit.
module vc_allocator
  import pfc_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 64
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]               req,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0][PORT_W-1:0]   port,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]               vc_busy,   // per output port
  output logic [NUM_PORTS-1:0][NUM_VC-1:0]               grant,
  output logic [NUM_PORTS-1:0][NUM_VC-1:0][VC_W-1:0]     outvc,
  output logic [NUM_PORTS-1:0]                           alloc_valid, // per output port
  output logic [NUM_PORTS-1:0][VC_W-1:0]                 alloc_vc
);

  localparam int unsigned NREQ = NUM_PORTS * NUM_VC;

  logic [NUM_PORTS-1:0][NREQ-1:0] o_req;
  logic [NUM_PORTS-1:0][NREQ-1:0] o_gnt;
  logic [NUM_PORTS-1:0]           o_any;
  logic [NUM_PORTS-1:0]           o_free;
  logic [NUM_PORTS-1:0][VC_W-1:0] o_vc;

  // Per output port: the lowest free VC and the input VCs that want it.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      o_free[o] = 1'b0;
      o_vc[o]   = '0;
      for (int v = NUM_VC - 1; v >= 0; v--) begin
        if (!vc_busy[o][v]) begin
          o_free[o] = 1'b1;
          o_vc[o]   = VC_W'(v);
        end
      end
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VC; v++)
          o_req[o][i*NUM_VC+v] = req[i][v] && (port[i][v] == PORT_W'(o)) && o_free[o];
    end

    rr_arbiter #(.N(NREQ)) u_arb (
      .clk (clk), .rst_n (rst_n), .req (o_req[o]), .advance (1'b1),
      .grant (o_gnt[o]), .grant_idx (), .any (o_any[o])
    );
  end

  assign alloc_valid = o_any;
  assign alloc_vc    = o_vc;

  // Per input VC: granted by at most one output (it requests only one).
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    always_comb begin
      grant[i] = '0;
      outvc[i] = '0;
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VC; v++)
          if (o_gnt[o][i*NUM_VC+v]) begin
            grant[i][v] = 1'b1;
            outvc[i][v] = o_vc[o];
          end
    end
  end

endmodule
