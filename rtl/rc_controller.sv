// rc_controller: the controller between the hash function, the routing table
// cache and the external routing table (CAM).
//
// It looks at the request in the cache's compare stage each cycle:
//   lookup, hit  -> the output port comes from the cache (res_fire, res_hit=1)
//   lookup, miss -> the pipeline stalls, the key is sent to the CAM
//                   (cam_req_valid held until cam_resp_valid); the answer is
//                   written into the cache's victim way and returned
//                   (res_fire, res_hit=0) in the cycle it arrives, and the
//                   pipeline moves on in that same cycle
//   update       -> writes a new output port for a key without asking the CAM:
//                   into the way holding the key, else into the victim way
//                   (used to steer around a failed link)
// One miss is outstanding at a time and results leave in request order.
// Sending misses to the CAM is the design's; blocking on a miss, the
// request/response handshake and the update operation's form are this
// module's own choices.
module rc_controller
  import pfc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // compare stage
  input  logic                    c_valid,
  input  logic                    c_upd,       // 1: update, 0: lookup
  input  cache_key_t              c_key,
  input  logic [PORT_W-1:0]       c_upd_port,
  input  logic                    c_hit,
  input  logic [WAY_W-1:0]        c_hit_way,
  input  logic [PORT_W-1:0]       c_hit_port,
  input  logic [WAY_W-1:0]        c_victim,
  // pipeline control
  output logic                    stall,
  // cache write
  output logic                    wr_en,
  output logic [WAY_W-1:0]        wr_way,
  output logic [PORT_W-1:0]       wr_port,
  // result of a lookup
  output logic                    res_fire,
  output logic                    res_hit,
  output logic [PORT_W-1:0]       res_port,
  // CAM
  output logic                    cam_req_valid,
  output cache_key_t              cam_req_key,
  input  logic                    cam_resp_valid,
  input  logic [PORT_W-1:0]       cam_resp_port
);

  typedef enum logic {S_RUN, S_WAIT} state_e;
  state_e state, state_n;

  assign cam_req_key = c_key;

  always_comb begin
    state_n       = state;
    stall         = 1'b0;
    wr_en         = 1'b0;
    wr_way        = c_victim;
    wr_port       = c_upd_port;
    res_fire      = 1'b0;
    res_hit       = 1'b0;
    res_port      = c_hit_port;
    cam_req_valid = 1'b0;
    unique case (state)
      S_RUN: begin
        if (c_valid && c_upd) begin
          wr_en  = 1'b1;
          wr_way = c_hit ? c_hit_way : c_victim;
        end else if (c_valid && c_hit) begin
          res_fire = 1'b1;
          res_hit  = 1'b1;
        end else if (c_valid) begin
          stall   = 1'b1;
          state_n = S_WAIT;
        end
      end
      S_WAIT: begin
        cam_req_valid = 1'b1;
        if (cam_resp_valid) begin
          wr_en    = 1'b1;
          wr_port  = cam_resp_port;
          res_fire = 1'b1;
          res_port = cam_resp_port;
          state_n  = S_RUN;
        end else begin
          stall = 1'b1;
        end
      end
      default: state_n = S_RUN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_RUN;
    else        state <= state_n;
  end

endmodule
