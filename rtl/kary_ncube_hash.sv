// kary_ncube_hash: output-link tag for a k-ary n-cube (mesh or torus) under
// dimension-order routing.
//
// Both addresses are n packed digits, digit 0 in the low bits. Dimensions are
// scanned from 0 upward and the first one whose offset d_i - c_i is non-zero
// decides the tag X_{i,dir}:
//   offset >  ceil(k/2) -> X_{i,a}   (the short way round a torus is '-')
//   offset >  0         -> X_{i,+}
//   offset < -ceil(k/2) -> X_{i,b}   (the short way round a torus is '+')
//   offset <  0         -> X_{i,-}
// When every offset is zero the tag is the local compute node. The same tags
// serve meshes and tori: only the output port stored with a tag differs.
// The tag is {dim[3:0], dir[1:0]}; the local node is KARY_LOCAL.
//
// The five shapes (256^3, 64^4, 16^6, 8^8, 4^12) and the threshold rule are
// the design's; resolving the lowest differing dimension first follows the
// shared-entry example of the 3-ary 2-mesh. The runtime radix k lets a
// smaller torus be embedded in a shape. Purely combinational.
module kary_ncube_hash
  import pfc_pkg::*;
(
  input  kary_shape_e        shape,
  input  logic [8:0]         k,          // radix in use
  input  logic [ADDR_W-1:0]  cur,        // this switch's coordinates
  input  logic [ADDR_W-1:0]  dst,        // destination compute node
  output logic [5:0]         tag
);

  logic [3:0] bits;    // digit width
  logic [3:0] ndim;    // number of dimensions

  always_comb begin
    unique case (shape)
      KC_256X3: begin bits = 4'd8; ndim = 4'd3;  end
      KC_64X4:  begin bits = 4'd6; ndim = 4'd4;  end
      KC_16X6:  begin bits = 4'd4; ndim = 4'd6;  end
      KC_8X8:   begin bits = 4'd3; ndim = 4'd8;  end
      KC_4X12:  begin bits = 4'd2; ndim = 4'd12; end
      default:  begin bits = 4'd8; ndim = 4'd3;  end
    endcase
  end

  logic signed [9:0] half;
  assign half = signed'({1'b0, (k + 9'd1) >> 1});

  always_comb begin
    logic              found;
    logic [7:0]        mask;
    logic [7:0]        dd, cc;
    logic signed [9:0] off;
    tag   = KARY_LOCAL;
    found = 1'b0;
    mask  = 8'((9'd1 << bits) - 9'd1);
    for (int i = 0; i < 12; i++) begin
      dd  = 8'(dst >> (i * int'(bits))) & mask;
      cc  = 8'(cur >> (i * int'(bits))) & mask;
      off = signed'({2'b00, dd}) - signed'({2'b00, cc});
      if (!found && (4'(i) < ndim) && (off != 10'sd0)) begin
        found = 1'b1;
        if (off > half)        tag = {4'(i), DIR_A};
        else if (off > 0)      tag = {4'(i), DIR_PLUS};
        else if (off < -half)  tag = {4'(i), DIR_B};
        else                   tag = {4'(i), DIR_MINUS};
      end
    end
  end

endmodule
