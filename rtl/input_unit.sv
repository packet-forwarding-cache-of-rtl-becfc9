// input_unit: virtual-channel input buffers of one switch port and the
// per-VC packet state that drives routing computation (RC), VC allocation
// (VA) and switch allocation (SA).
//
// Each of the NUM_VC virtual channels has a FIFO of BUF_DEPTH flits and a
// state:
//   IDLE   -> a head flit at the front asks the routing computation unit for
//             its output port (one VC per cycle, round-robin)
//   RC     -> waiting for the routing result (tagged with the VC number)
//   VA     -> asks the VC allocator for a VC of that output port
//   ACTIVE -> each flit asks the switch allocator for the crossbar while the
//             downstream VC has a credit; the tail flit returns the VC to IDLE
// A granted flit leaves in the cycle of the grant with its VC field set to the
// output VC, and a credit for the freed slot goes back upstream.
// The flow of RC, VA, SA and ST per packet is the four-stage switch the design
// builds on; buffer depth, VC count and credit flow control are this design's
// own choices.
module input_unit
  import pfc_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // link in
  input  logic                     in_valid,
  input  flit_t                    in_flit,
  output logic                     cr_valid,     // credit to upstream
  output logic [VC_W-1:0]          cr_vc,
  // routing computation
  output logic                     rc_req_valid,
  input  logic                     rc_req_ready,
  output logic [ADDR_W-1:0]        rc_req_dst,
  output logic [VC_W-1:0]          rc_req_id,
  input  logic                     rc_res_valid,
  input  logic [VC_W-1:0]          rc_res_id,
  input  logic [PORT_W-1:0]        rc_res_port,
  // VC allocation
  output logic [NUM_VC-1:0]        va_req,
  output logic [NUM_VC-1:0][PORT_W-1:0] va_port,
  input  logic [NUM_VC-1:0]        va_grant,
  input  logic [NUM_VC-1:0][VC_W-1:0]   va_outvc,
  // switch allocation
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0] cred_avail,
  output logic [NUM_VC-1:0]        sa_req,
  output logic [NUM_VC-1:0][PORT_W-1:0] sa_port,
  input  logic                     sa_grant,
  input  logic [VC_W-1:0]          sa_vc,
  // to the crossbar
  output logic                     xb_valid,
  output flit_t                    xb_flit
);

  typedef enum logic [1:0] {VS_IDLE, VS_RC, VS_VA, VS_ACTIVE} vc_state_e;
  localparam int unsigned PTR_W = $clog2(BUF_DEPTH);

  flit_t              buf_q  [NUM_VC][BUF_DEPTH];
  logic [PTR_W-1:0]   rd_ptr [NUM_VC];
  logic [PTR_W-1:0]   wr_ptr [NUM_VC];
  logic [PTR_W:0]     count  [NUM_VC];
  vc_state_e          state  [NUM_VC];
  logic [PORT_W-1:0]  oport  [NUM_VC];
  logic [VC_W-1:0]    ovc    [NUM_VC];

  flit_t              front  [NUM_VC];
  logic [NUM_VC-1:0]  nonempty;

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      front[v]    = buf_q[v][rd_ptr[v]];
      nonempty[v] = (count[v] != 0);
    end
  end

  // ---- RC request: one idle VC with a head flit per cycle
  logic [NUM_VC-1:0] rc_cand;
  logic [VC_W-1:0]   rc_idx;
  logic              rc_any;

  always_comb begin
    for (int v = 0; v < NUM_VC; v++)
      rc_cand[v] = (state[v] == VS_IDLE) && nonempty[v] && is_head(front[v].kind);
  end

  rr_arbiter #(.N(NUM_VC)) u_rc_arb (
    .clk (clk), .rst_n (rst_n), .req (rc_cand),
    .advance (rc_req_ready), .grant (), .grant_idx (rc_idx), .any (rc_any)
  );

  assign rc_req_valid = rc_any;
  assign rc_req_id    = rc_idx;
  assign rc_req_dst   = front[rc_idx].data[ADDR_W-1:0];

  // ---- VA and SA requests
  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      va_req[v]  = (state[v] == VS_VA);
      va_port[v] = oport[v];
      sa_req[v]  = (state[v] == VS_ACTIVE) && nonempty[v] && cred_avail[oport[v]][ovc[v]];
      sa_port[v] = oport[v];
    end
  end

  // ---- flit out
  always_comb begin
    xb_valid    = sa_grant;
    xb_flit     = front[sa_vc];
    xb_flit.vc  = ovc[sa_vc];
  end

  assign cr_valid = sa_grant;
  assign cr_vc    = sa_vc;

  // ---- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) begin
        rd_ptr[v] <= '0;
        wr_ptr[v] <= '0;
        count[v]  <= '0;
        state[v]  <= VS_IDLE;
        oport[v]  <= '0;
        ovc[v]    <= '0;
      end
    end else begin
      // Upstream must respect credits: never write a full VC buffer.
      a_no_overflow: assert (!in_valid || count[in_flit.vc] < (PTR_W+1)'(BUF_DEPTH));
      for (int v = 0; v < NUM_VC; v++) begin
        logic push, pop;
        push = in_valid && (in_flit.vc == VC_W'(v));
        pop  = sa_grant && (sa_vc == VC_W'(v));
        if (push) begin
          wr_ptr[v] <= wr_ptr[v] + 1'b1;
        end
        if (pop) rd_ptr[v] <= rd_ptr[v] + 1'b1;
        count[v] <= count[v] + (PTR_W+1)'(push) - (PTR_W+1)'(pop);

        unique case (state[v])
          VS_IDLE:   if (rc_any && rc_req_ready && rc_idx == VC_W'(v)) state[v] <= VS_RC;
          VS_RC:     if (rc_res_valid && rc_res_id == VC_W'(v)) begin
                       state[v] <= VS_VA;
                       oport[v] <= rc_res_port;
                     end
          VS_VA:     if (va_grant[v]) begin
                       state[v] <= VS_ACTIVE;
                       ovc[v]   <= va_outvc[v];
                     end
          VS_ACTIVE: if (pop && is_tail(front[v].kind)) state[v] <= VS_IDLE;
          default:   state[v] <= VS_IDLE;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) buf_q[in_flit.vc][wr_ptr[in_flit.vc]] <= in_flit;
  end

endmodule
