// tb_lag_hash: checks the link-aggregation member against polynomial long
// division by x^4+x+1 and that it stays inside a bundle of 2^lag_bits links.
module tb_lag_hash;
  import pfc_pkg::*;

  logic [ADDR_W-1:0] dst;
  logic [2:0]        lag_bits;
  logic [LAG_W-1:0]  member;
  int checks = 0, failures = 0;
  int hist [16];

  lag_hash dut (.dst(dst), .lag_bits(lag_bits), .member(member));

  function automatic logic [3:0] ref_crc(logic [23:0] a);
    logic [27:0] m;
    m = {a, 4'h0};
    for (int i = 27; i >= 4; i--)
      if (m[i]) m[i-:5] = m[i-:5] ^ 5'h13;
    return m[3:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    for (int t = 0; t < 2000; t++) begin
      int nb;
      dst      = 24'($urandom);
      lag_bits = 3'($urandom_range(0, 4));
      nb = 1 << lag_bits;
      #1;
      checks++;
      if (member !== 4'(ref_crc(dst) % nb)) begin
        failures++;
        $display("FAIL dst=%h bits=%0d member=%0d exp=%0d", dst, lag_bits, member, ref_crc(dst) % nb);
      end
      if (lag_bits == 4) hist[member]++;
    end
    // all 16 links of a full bundle get used
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (hist[i] == 0) begin failures++; $display("FAIL link %0d never chosen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
