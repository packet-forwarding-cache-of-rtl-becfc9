// output_unit: one output port of the switch.
//
// It registers the flit coming out of the crossbar onto the link (switch
// traversal, one cycle), keeps a credit counter for each downstream VC buffer
// (starting at BUF_DEPTH, minus one per flit sent, plus one per credit
// returned) and a busy flag per output VC: set when the VC allocator hands the
// VC out, cleared when the packet's tail flit is sent. cred_avail and vc_busy
// feed the allocators. Credit flow control is this design's own choice.
module output_unit
  import pfc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // from the crossbar
  input  logic                xb_valid,
  input  flit_t               xb_flit,
  // from the VC allocator
  input  logic                alloc_valid,
  input  logic [VC_W-1:0]     alloc_vc,
  // link out
  output logic                out_valid,
  output flit_t               out_flit,
  input  logic                cr_valid,     // credit from downstream
  input  logic [VC_W-1:0]     cr_vc,
  // state for the allocators
  output logic [NUM_VC-1:0]   cred_avail,
  output logic [NUM_VC-1:0]   vc_busy
);

  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  logic [CW-1:0] credits [NUM_VC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
      vc_busy   <= '0;
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CW'(BUF_DEPTH);
    end else begin
      // The switch allocator only sends into a VC that has a credit.
      a_credit_ok: assert (!xb_valid || credits[xb_flit.vc] != '0);
      out_valid <= xb_valid;
      if (xb_valid) out_flit <= xb_flit;
      for (int v = 0; v < NUM_VC; v++) begin
        logic sent, back;
        sent = xb_valid && (xb_flit.vc == VC_W'(v));
        back = cr_valid && (cr_vc == VC_W'(v));
        credits[v] <= credits[v] - CW'(sent) + CW'(back);
        if (alloc_valid && alloc_vc == VC_W'(v))         vc_busy[v] <= 1'b1;
        else if (sent && is_tail(xb_flit.kind))          vc_busy[v] <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) cred_avail[v] = (credits[v] != '0);
  end

endmodule
