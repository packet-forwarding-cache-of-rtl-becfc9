// arbitrary_hash: cache set index for an arbitrary topology.
//
// With no topology regularity to exploit, the whole 24-bit destination address
// is the cache key and a CRC spreads addresses evenly over the sets. The index
// is the low IDX_W bits of CRC-16-CCITT (init 0xFFFF, address MSB first) of the
// address, XORed with the link-aggregation member so that the members of one
// bundle do not crowd a single set. A CRC is the design's choice of hash; the
// polynomial is this module's own. Purely combinational.
module arbitrary_hash
  import pfc_pkg::*;
(
  input  logic [ADDR_W-1:0]  dst,
  input  logic [LAG_W-1:0]   lag,
  output logic [IDX_W-1:0]   idx
);

  logic [IDX_W-1:0] crc_lo;
  assign crc_lo = IDX_W'(crc16_addr(dst));
  assign idx    = crc_lo ^ {{(IDX_W-LAG_W){1'b0}}, lag};

endmodule
