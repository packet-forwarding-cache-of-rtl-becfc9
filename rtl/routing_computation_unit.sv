// routing_computation_unit: routing computation with a packet forwarding
// cache, one per input port.
//
// A request carries a packet's destination address and an id (the input VC).
// Pipeline, one request per cycle while the cache hits:
//   H  switchable hash -> key and set index (registered when HASH_REG = 1)
//   R  registered read of the set from the routing table cache
//   C  tag compare in all four ways; the controller returns the output port
//      on a hit, or stalls and asks the external CAM on a miss
// With HASH_REG = 1 (default) a lookup presented (and accepted) in cycle t has
// its result on res_* in cycle t+3, one result per cycle; with HASH_REG = 0
// (combinational hash) in cycle t+2.
// A miss adds the CAM's response time. Results leave in request order.
//
// Management: `flush` empties the cache (done after the hash is switched and
// after a fault); an update (upd_*) writes an output port for a cache key
// directly and takes priority over lookups. `cfg` is the switch's hash
// configuration and must be held steady while lookups run.
// The three-stage split is this design's reading of the three-stage
// pipelined routing computation; the handshakes are its own.
module routing_computation_unit
  import pfc_pkg::*;
#(
  parameter int unsigned ID_W     = VC_W,
  parameter bit          HASH_REG = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  hash_cfg_t           cfg,
  input  logic                flush,
  // lookup requests
  input  logic                req_valid,
  output logic                req_ready,
  input  logic [ADDR_W-1:0]   req_dst,
  input  logic [ID_W-1:0]     req_id,
  // cache updates (management)
  input  logic                upd_valid,
  output logic                upd_ready,
  input  cache_key_t          upd_key,
  input  logic [PORT_W-1:0]   upd_port,
  // results
  output logic                res_valid,
  output logic [ID_W-1:0]     res_id,
  output logic [PORT_W-1:0]   res_port,
  output logic                res_hit,
  // external routing table (CAM)
  output logic                cam_req_valid,
  output cache_key_t          cam_req_key,
  input  logic                cam_resp_valid,
  input  logic [PORT_W-1:0]   cam_resp_port
);

  typedef struct packed {
    logic              valid;
    logic              upd;
    cache_key_t        key;
    logic [IDX_W-1:0]  idx;
    logic [ID_W-1:0]   id;
    logic [PORT_W-1:0] port;
  } stage_t;

  logic       stall;
  cache_key_t h_key;
  logic [IDX_W-1:0] h_idx;
  stage_t     in_s, h_s, r_s;

  switchable_hash u_hash (
    .cfg (cfg),
    .dst (req_dst),
    .key (h_key),
    .idx (h_idx)
  );

  // stage H input: an update wins over a lookup
  always_comb begin
    in_s = '0;
    if (upd_valid) begin
      in_s.valid = 1'b1;
      in_s.upd   = 1'b1;
      in_s.key   = upd_key;
      in_s.idx   = key_index(upd_key);
      in_s.port  = upd_port;
    end else if (req_valid) begin
      in_s.valid = 1'b1;
      in_s.key   = h_key;
      in_s.idx   = h_idx;
      in_s.id    = req_id;
    end
  end

  assign upd_ready = !stall;
  assign req_ready = !stall && !upd_valid;

  if (HASH_REG) begin : g_hreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      h_s <= '0;
      else if (!stall) h_s <= in_s;
    end
  end else begin : g_hcomb
    assign h_s = in_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      r_s <= '0;
    else if (!stall) r_s <= h_s;
  end

  // cache
  logic             c_hit;
  logic [WAY_W-1:0] c_hit_way, c_victim, wr_way;
  logic [PORT_W-1:0] c_hit_port, wr_port;
  logic             wr_en;

  routing_table_cache u_cache (
    .clk      (clk),
    .rst_n    (rst_n),
    .flush    (flush),
    .rd_idx   (stall ? r_s.idx : h_s.idx),
    .cmp_idx  (r_s.idx),
    .cmp_key  (r_s.key),
    .hit      (c_hit),
    .hit_way  (c_hit_way),
    .hit_port (c_hit_port),
    .victim   (c_victim),
    .wr_en    (wr_en),
    .wr_idx   (r_s.idx),
    .wr_way   (wr_way),
    .wr_key   (r_s.key),
    .wr_port  (wr_port)
  );

  logic              res_fire, res_hit_c;
  logic [PORT_W-1:0] res_port_c;

  rc_controller u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .c_valid        (r_s.valid),
    .c_upd          (r_s.upd),
    .c_key          (r_s.key),
    .c_upd_port     (r_s.port),
    .c_hit          (c_hit),
    .c_hit_way      (c_hit_way),
    .c_hit_port     (c_hit_port),
    .c_victim       (c_victim),
    .stall          (stall),
    .wr_en          (wr_en),
    .wr_way         (wr_way),
    .wr_port        (wr_port),
    .res_fire       (res_fire),
    .res_hit        (res_hit_c),
    .res_port       (res_port_c),
    .cam_req_valid  (cam_req_valid),
    .cam_req_key    (cam_req_key),
    .cam_resp_valid (cam_resp_valid),
    .cam_resp_port  (cam_resp_port)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_id    <= '0;
      res_port  <= '0;
      res_hit   <= 1'b0;
    end else begin
      res_valid <= res_fire;
      res_id    <= r_s.id;
      res_port  <= res_port_c;
      res_hit   <= res_hit_c;
    end
  end

endmodule
