// routing_table_cam_model: behavioural model of the external CAM routing
// table, for simulation only.
//
// The real part is a commercial TCAM chip outside the switch, filled when the
// machine is deployed. This model answers a lookup LATENCY cycles after
// req_valid rises with a one-cycle resp_valid pulse. An entry written through
// wr_* is returned as written; any other key gets default_port(key), a fixed
// function that testbenches can recompute. It counts the lookups it served.
module routing_table_cam_model
  import pfc_pkg::*;
#(
  parameter int unsigned LATENCY   = 4,
  parameter int unsigned NUM_PORTS = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  cache_key_t        req_key,
  output logic              resp_valid,
  output logic [PORT_W-1:0] resp_port,
  input  logic              wr_en,
  input  cache_key_t        wr_key,
  input  logic [PORT_W-1:0] wr_port,
  output int unsigned       lookups
);

  logic [PORT_W-1:0] table_q [cache_key_t];
  int unsigned       cnt;
  logic              busy;

  function automatic logic [PORT_W-1:0] default_port(cache_key_t k);
    return PORT_W'((k.payload * 7 + k.lag * 3 + k.mode) % NUM_PORTS);
  endfunction

  initial begin
    busy = 1'b0; cnt = 0; resp_valid = 1'b0; resp_port = '0; lookups = 0;
  end

  always @(posedge clk) begin
    if (wr_en) table_q[wr_key] = wr_port;
    resp_valid <= 1'b0;
    if (!rst_n) begin
      busy <= 1'b0;
    end else if (busy) begin
      if (cnt <= 1) begin
        busy       <= 1'b0;
        resp_valid <= 1'b1;
        resp_port  <= table_q.exists(req_key) ? table_q[req_key] : default_port(req_key);
        lookups    <= lookups + 1;
      end else begin
        cnt <= cnt - 1;
      end
    end else if (req_valid && !resp_valid) begin
      busy <= 1'b1;
      cnt  <= LATENCY;
    end
  end

endmodule
