// tb_kary_ncube_hash: checks the k-ary n-cube tag against a reference written
// with integer division, on the 3-ary 2-mesh example (all destinations in
// column 2 seen from switch (1,1) use X_{0,+}), on hand-picked torus
// wrap-around cases and on random addresses for all five shapes.
module tb_kary_ncube_hash;
  import pfc_pkg::*;

  kary_shape_e       shape;
  logic [8:0]        k;
  logic [ADDR_W-1:0] cur, dst;
  logic [5:0]        tag;
  int checks = 0, failures = 0;

  kary_ncube_hash dut (.shape(shape), .k(k), .cur(cur), .dst(dst), .tag(tag));

  function automatic int radix_of(kary_shape_e s);
    case (s)
      KC_256X3: return 256;
      KC_64X4:  return 64;
      KC_16X6:  return 16;
      KC_8X8:   return 8;
      default:  return 4;
    endcase
  endfunction

  function automatic int dims_of(kary_shape_e s);
    case (s)
      KC_256X3: return 3;
      KC_64X4:  return 4;
      KC_16X6:  return 6;
      KC_8X8:   return 8;
      default:  return 12;
    endcase
  endfunction

  function automatic logic [5:0] ref_tag(kary_shape_e s, int kk, int c, int d);
    int r = radix_of(s);
    int h = (kk + 1) / 2;
    int cw = c, dw = d;
    for (int i = 0; i < dims_of(s); i++) begin
      int off = (dw % r) - (cw % r);
      cw = cw / r; dw = dw / r;
      if (off > h)       return {4'(i), 2'd0};
      else if (off > 0)  return {4'(i), 2'd1};
      else if (off < -h) return {4'(i), 2'd2};
      else if (off < 0)  return {4'(i), 2'd3};
    end
    return 6'h3C;
  endfunction

  task automatic check(string what, logic [5:0] exp);
    #1;
    checks++;
    if (tag !== exp) begin
      failures++;
      $display("FAIL %s: shape=%0d k=%0d cur=%h dst=%h tag=%h exp=%h", what, shape, k, cur, dst, tag, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 3-ary 2-mesh embedded in the 4-ary 12-cube shape, switch (1,1)
    shape = KC_4X12; k = 9'd3; cur = 24'h5;
    dst = 24'h2; check("mesh (0,2)", 6'b0000_01);
    dst = 24'h6; check("mesh (1,2)", 6'b0000_01);
    dst = 24'hA; check("mesh (2,2)", 6'b0000_01);
    dst = 24'h4; check("mesh (1,0)", 6'b0000_11);   // X_{0,-}
    dst = 24'h9; check("mesh (2,1)", 6'b0001_01);   // X_{1,+}
    dst = 24'h1; check("mesh (0,1)", 6'b0001_11);   // X_{1,-}
    dst = 24'h5; check("local",      6'h3C);
    // 8-ary ring in dimension 0 of the 8^8 shape: wrap-around tags
    shape = KC_8X8; k = 9'd8; cur = 24'h1;
    dst = 24'h6; check("torus a", 6'b0000_00);       // +5 > 4
    dst = 24'h5; check("torus +4", 6'b0000_01);      // +4 not > 4
    shape = KC_8X8; cur = 24'h6;
    dst = 24'h1; check("torus b", 6'b0000_10);       // -5 < -4
    dst = 24'h2; check("torus -4", 6'b0000_11);
    // random
    for (int n = 0; n < 2000; n++) begin
      shape = kary_shape_e'($urandom_range(0, 4));
      k     = 9'(radix_of(shape) - (($urandom_range(0, 3) == 0) ? 1 : 0));
      cur   = 24'($urandom);
      dst   = ($urandom_range(0, 3) == 0) ? cur ^ 24'(1 << $urandom_range(0, 23)) : 24'($urandom);
      check("random", ref_tag(shape, int'(k), int'(cur), int'(dst)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
