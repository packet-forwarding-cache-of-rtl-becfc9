// cache_switch: an input-queued virtual-channel switch whose routing
// computation is done by a packet forwarding cache at every input port.
//
// A packet's head flit carries a 24-bit destination address. At its input
// port, the routing computation unit hashes the address with the switchable
// hash (k-ary n-cube, fat tree/Dragonfly or arbitrary-topology CRC, plus the
// link-aggregation member) into a cache key and looks the key up in a 2,048
// entry, four-way set-associative cache. A hit gives the output port in three
// cycles without touching the routing table; a miss fetches it from the
// external CAM routing table through that port's cam_* interface and fills
// the cache. Then the packet goes through VC allocation (1 cycle), switch
// allocation (1 cycle) and switch traversal (1 cycle, registered in the output
// unit); body flits follow one per cycle. Flow control on the links is
// credit-based, one credit per flit slot, NUM_VC VCs of BUF_DEPTH flits.
//
// Management: cfg selects the hash and holds this switch's coordinates; flush
// empties every cache; upd_* writes one key's output port into every input
// port's cache (e.g. to route around a failed link) and is idempotent, so
// upd_valid is simply held until upd_ready.
// The cache switch organisation follows the design; the router around the
// routing unit (allocators, buffers, credits) is a plain virtual-channel
// router of this design's own making. The CAM is outside the chip.
module cache_switch
  import pfc_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 64,
  parameter bit          HASH_REG  = 1'b1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // configuration and management
  input  hash_cfg_t                           cfg,
  input  logic                                flush,
  input  logic                                upd_valid,
  output logic                                upd_ready,
  input  cache_key_t                          upd_key,
  input  logic [PORT_W-1:0]                   upd_port,
  // input links
  input  logic  [NUM_PORTS-1:0]               in_valid,
  input  flit_t [NUM_PORTS-1:0]               in_flit,
  output logic  [NUM_PORTS-1:0]               in_cr_valid,
  output logic  [NUM_PORTS-1:0][VC_W-1:0]     in_cr_vc,
  // output links
  output logic  [NUM_PORTS-1:0]               out_valid,
  output flit_t [NUM_PORTS-1:0]               out_flit,
  input  logic  [NUM_PORTS-1:0]               out_cr_valid,
  input  logic  [NUM_PORTS-1:0][VC_W-1:0]     out_cr_vc,
  // external CAM routing table, one interface per input port
  output logic       [NUM_PORTS-1:0]              cam_req_valid,
  output cache_key_t [NUM_PORTS-1:0]              cam_req_key,
  input  logic       [NUM_PORTS-1:0]              cam_resp_valid,
  input  logic       [NUM_PORTS-1:0][PORT_W-1:0]  cam_resp_port,
  // routing computation events (one pulse per routed packet)
  output logic  [NUM_PORTS-1:0]               rc_done,
  output logic  [NUM_PORTS-1:0]               rc_hit
);

  localparam int unsigned PI_W = $clog2(NUM_PORTS);

  logic [NUM_PORTS-1:0]                        rc_req_valid, rc_req_ready, rc_res_valid;
  logic [NUM_PORTS-1:0][ADDR_W-1:0]            rc_req_dst;
  logic [NUM_PORTS-1:0][VC_W-1:0]              rc_req_id, rc_res_id;
  logic [NUM_PORTS-1:0][PORT_W-1:0]            rc_res_port;
  logic [NUM_PORTS-1:0]                        rcu_upd_ready;

  logic [NUM_PORTS-1:0][NUM_VC-1:0]            va_req, va_grant, sa_req;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][PORT_W-1:0] va_port, sa_port;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][VC_W-1:0]  va_outvc;
  logic [NUM_PORTS-1:0]                        alloc_valid;
  logic [NUM_PORTS-1:0][VC_W-1:0]              alloc_vc;

  logic [NUM_PORTS-1:0]                        sa_in_grant, sa_out_valid;
  logic [NUM_PORTS-1:0][VC_W-1:0]              sa_in_vc;
  logic [NUM_PORTS-1:0][PI_W-1:0]              sa_out_sel;

  logic  [NUM_PORTS-1:0]                       xb_in_valid, xb_out_valid;
  flit_t [NUM_PORTS-1:0]                       xb_in_flit, xb_out_flit;

  logic [NUM_PORTS-1:0][NUM_VC-1:0]            cred_avail, vc_busy;

  assign upd_ready = &rcu_upd_ready;
  assign rc_done   = rc_res_valid;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    routing_computation_unit #(.ID_W(VC_W), .HASH_REG(HASH_REG)) u_rcu (
      .clk            (clk),
      .rst_n          (rst_n),
      .cfg            (cfg),
      .flush          (flush),
      .req_valid      (rc_req_valid[p]),
      .req_ready      (rc_req_ready[p]),
      .req_dst        (rc_req_dst[p]),
      .req_id         (rc_req_id[p]),
      .upd_valid      (upd_valid),
      .upd_ready      (rcu_upd_ready[p]),
      .upd_key        (upd_key),
      .upd_port       (upd_port),
      .res_valid      (rc_res_valid[p]),
      .res_id         (rc_res_id[p]),
      .res_port       (rc_res_port[p]),
      .res_hit        (rc_hit[p]),
      .cam_req_valid  (cam_req_valid[p]),
      .cam_req_key    (cam_req_key[p]),
      .cam_resp_valid (cam_resp_valid[p]),
      .cam_resp_port  (cam_resp_port[p])
    );

    input_unit #(.NUM_PORTS(NUM_PORTS)) u_in (
      .clk          (clk),
      .rst_n        (rst_n),
      .in_valid     (in_valid[p]),
      .in_flit      (in_flit[p]),
      .cr_valid     (in_cr_valid[p]),
      .cr_vc        (in_cr_vc[p]),
      .rc_req_valid (rc_req_valid[p]),
      .rc_req_ready (rc_req_ready[p]),
      .rc_req_dst   (rc_req_dst[p]),
      .rc_req_id    (rc_req_id[p]),
      .rc_res_valid (rc_res_valid[p]),
      .rc_res_id    (rc_res_id[p]),
      .rc_res_port  (rc_res_port[p]),
      .va_req       (va_req[p]),
      .va_port      (va_port[p]),
      .va_grant     (va_grant[p]),
      .va_outvc     (va_outvc[p]),
      .cred_avail   (cred_avail),
      .sa_req       (sa_req[p]),
      .sa_port      (sa_port[p]),
      .sa_grant     (sa_in_grant[p]),
      .sa_vc        (sa_in_vc[p]),
      .xb_valid     (xb_in_valid[p]),
      .xb_flit      (xb_in_flit[p])
    );

    output_unit u_out (
      .clk         (clk),
      .rst_n       (rst_n),
      .xb_valid    (xb_out_valid[p]),
      .xb_flit     (xb_out_flit[p]),
      .alloc_valid (alloc_valid[p]),
      .alloc_vc    (alloc_vc[p]),
      .out_valid   (out_valid[p]),
      .out_flit    (out_flit[p]),
      .cr_valid    (out_cr_valid[p]),
      .cr_vc       (out_cr_vc[p]),
      .cred_avail  (cred_avail[p]),
      .vc_busy     (vc_busy[p])
    );
  end

  vc_allocator #(.NUM_PORTS(NUM_PORTS)) u_va (
    .clk         (clk),
    .rst_n       (rst_n),
    .req         (va_req),
    .port        (va_port),
    .vc_busy     (vc_busy),
    .grant       (va_grant),
    .outvc       (va_outvc),
    .alloc_valid (alloc_valid),
    .alloc_vc    (alloc_vc)
  );

  switch_allocator #(.NUM_PORTS(NUM_PORTS)) u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (sa_req),
    .port      (sa_port),
    .in_grant  (sa_in_grant),
    .in_vc     (sa_in_vc),
    .out_valid (sa_out_valid),
    .out_sel   (sa_out_sel)
  );

  crossbar #(.NUM_PORTS(NUM_PORTS)) u_xb (
    .in_valid  (xb_in_valid),
    .in_flit   (xb_in_flit),
    .sel_valid (sa_out_valid),
    .sel       (sa_out_sel),
    .out_valid (xb_out_valid),
    .out_flit  (xb_out_flit)
  );

endmodule
