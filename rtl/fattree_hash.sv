// fattree_hash: output-link tag for a k-ary n-dimensional fat tree under
// up*/down* routing; a Dragonfly built from such a fat tree (inter-rack layer
// on top, intra-rack groups below) uses the same function.
//
// A switch sits at layer `dim` with coordinates (c_{n-1}..c_0); a compute node
// has coordinates (d_n..d_0). Digits are log2(k) bits wide, digit 0 in the
// low bits. Scanning i from n-1 down to dim, the first i with d_{i+1} != c_i
// means the destination is outside this switch's subtree and the tag is
// up_{d_i}; when none differs the packet goes down through down_{d_dim}.
// The tag is {updown, j}: updown = 1 for up_j, 0 for down_j, j on 8 bits.
//
// The loop bounds, the comparisons and the link names follow the design's
// algorithm; stopping at the first difference and the tag encoding are this
// module's choices. Purely combinational.
module fattree_hash
  import pfc_pkg::*;
(
  input  logic [3:0]         bits,       // log2(k), 1..8
  input  logic [4:0]         n,          // number of switch dimensions
  input  logic [4:0]         dim,        // layer of this switch
  input  logic [ADDR_W-1:0]  cur,        // (c_{n-1}..c_0)
  input  logic [ADDR_W-1:0]  dst,        // (d_n..d_0)
  output logic               up,
  output logic [7:0]         j
);

  function automatic logic [7:0] digit(logic [ADDR_W-1:0] a, int pos, logic [3:0] b);
    logic [7:0] m;
    m = 8'((9'd1 << b) - 9'd1);
    return 8'(a >> (pos * int'(b))) & m;
  endfunction

  always_comb begin
    logic found;
    found = 1'b0;
    up    = 1'b0;
    j     = digit(dst, int'(dim), bits);
    for (int i = ADDR_W - 2; i >= 0; i--) begin
      if (!found && (5'(i) < n) && (5'(i) >= dim)
          && (digit(dst, i + 1, bits) != digit(cur, i, bits))) begin
        found = 1'b1;
        up    = 1'b1;
        j     = digit(dst, i, bits);
      end
    end
  end

endmodule
