// tb_fattree_hash: checks the fat-tree tag on the 2-ary 4-D fat tree example
// (switches at layers 0..3, compute nodes 00000..01111) and on random
// configurations against a reference written with integer division.
module tb_fattree_hash;
  import pfc_pkg::*;

  logic [3:0]        bits;
  logic [4:0]        n, dim;
  logic [ADDR_W-1:0] cur, dst;
  logic              up;
  logic [7:0]        j;
  int checks = 0, failures = 0;

  fattree_hash dut (.bits(bits), .n(n), .dim(dim), .cur(cur), .dst(dst), .up(up), .j(j));

  function automatic int dig(int a, int i, int kk);
    for (int t = 0; t < i; t++) a = a / kk;
    return a % kk;
  endfunction

  function automatic logic [8:0] ref_tag(int b, int nn, int dm, int c, int d);
    int kk = 1 << b;
    for (int i = nn - 1; i >= dm; i--)
      if (dig(d, i + 1, kk) != dig(c, i, kk)) return {1'b1, 8'(dig(d, i, kk))};
    return {1'b0, 8'(dig(d, dm, kk))};
  endfunction

  task automatic check(string what, logic [8:0] exp);
    #1;
    checks++;
    if ({up, j} !== exp) begin
      failures++;
      $display("FAIL %s: b=%0d n=%0d dim=%0d cur=%h dst=%h got=%b/%0d exp=%b/%0d",
               what, bits, n, dim, cur, dst, up, j, exp[8], exp[7:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bits = 4'd1; n = 5'd4;
    // leaf switch 00000 holds nodes 00000, 00001
    dim = 5'd0; cur = 24'b0000;
    dst = 24'b00001; check("leaf down_1", {1'b0, 8'd1});
    dst = 24'b00000; check("leaf down_0", {1'b0, 8'd0});
    dst = 24'b00010; check("leaf up",     {1'b1, 8'd0});  // d1=1 != c0=0 -> up_{d0}
    // layer-1 switch 10000
    dim = 5'd1; cur = 24'b0000;
    dst = 24'b00011; check("l1 down_1", {1'b0, 8'd1});
    dst = 24'b00100; check("l1 up_0",   {1'b1, 8'd0});
    // top switch 30000 reaches everything below by down links
    dim = 5'd3; cur = 24'b0000;
    dst = 24'b01110; check("top down_1", {1'b0, 8'd1});
    for (int t = 0; t < 2000; t++) begin
      int b, nn, dm, c, d;
      b  = $urandom_range(1, 4);
      nn = $urandom_range(1, 23 / b - 1);
      dm = $urandom_range(0, nn - 1);
      c  = int'($urandom) & ((1 << (b * nn)) - 1);
      d  = int'($urandom) & ((1 << (b * (nn + 1))) - 1);
      if ($urandom_range(0, 1) == 1) d = (d & ((1 << (b * (dm + 1))) - 1)) | ((c >> (b * dm)) << (b * (dm + 1)));
      bits = 4'(b); n = 5'(nn); dim = 5'(dm); cur = 24'(c); dst = 24'(d);
      check("random", ref_tag(b, nn, dm, c, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
