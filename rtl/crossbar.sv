// crossbar: NUM_PORTS x NUM_PORTS flit switch.
//
// Each output selects the flit of the input named by sel[o] when valid[o] is
// set by the switch allocator; the allocator guarantees that no input is
// selected twice. Combinational; the output unit registers the result
// (switch traversal). A multiplexer per output is this design's choice.
module crossbar
  import pfc_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 64
) (
  input  logic  [NUM_PORTS-1:0]                       in_valid,
  input  flit_t [NUM_PORTS-1:0]                       in_flit,
  input  logic  [NUM_PORTS-1:0]                       sel_valid,
  input  logic  [NUM_PORTS-1:0][$clog2(NUM_PORTS)-1:0] sel,
  output logic  [NUM_PORTS-1:0]                       out_valid,
  output flit_t [NUM_PORTS-1:0]                       out_flit
);

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = sel_valid[o] && in_valid[sel[o]];
      out_flit[o]  = in_flit[sel[o]];
    end
  end

endmodule
