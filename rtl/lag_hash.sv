// lag_hash: picks one link of a link-aggregation bundle from the destination.
//
// A bundle has 2^lag_bits links (lag_bits = 0..4, so up to 16 links). The
// member is CRC-4-ITU (x^4+x+1, init 0, address MSB first) of the 24-bit
// destination, reduced to lag_bits bits. One destination always uses the same
// member, so a flow stays on one link and in order. The CRC-based choice and
// the 16-link limit follow the design; the polynomial is this module's own.
// It runs beside the topology hash. Purely combinational.
module lag_hash
  import pfc_pkg::*;
(
  input  logic [ADDR_W-1:0]  dst,
  input  logic [2:0]         lag_bits,
  output logic [LAG_W-1:0]   member
);

  logic [3:0] crc;
  logic [3:0] mask;
  assign crc    = crc4_addr(dst);
  assign mask   = (lag_bits >= 3'd4) ? 4'hF : 4'((5'd1 << lag_bits) - 5'd1);
  assign member = crc & mask;

endmodule
