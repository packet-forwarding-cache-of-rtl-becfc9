// tb_arbitrary_hash: checks the CRC set index against polynomial long
// division of the augmented address (init folded in), for random addresses
// and link-aggregation members.
module tb_arbitrary_hash;
  import pfc_pkg::*;

  logic [ADDR_W-1:0] dst;
  logic [LAG_W-1:0]  lag;
  logic [IDX_W-1:0]  idx;
  int checks = 0, failures = 0;

  arbitrary_hash dut (.dst(dst), .lag(lag), .idx(idx));

  // remainder of (a * x^16 + 0xFFFF * x^24) mod (x^16 + x^12 + x^5 + 1)
  function automatic logic [15:0] ref_crc(logic [23:0] a);
    logic [39:0] m;
    m = {a, 16'h0} ^ {16'hFFFF, 24'h0};
    for (int i = 39; i >= 16; i--)
      if (m[i]) m[i-:17] = m[i-:17] ^ 17'h11021;
    return m[15:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [15:0] c;
      dst = (t == 0) ? 24'h0 : 24'($urandom);
      lag = 4'($urandom);
      c = ref_crc(dst);
      #1;
      checks++;
      if (idx !== (c[8:0] ^ {5'b0, lag})) begin
        failures++;
        $display("FAIL dst=%h lag=%h idx=%h exp=%h", dst, lag, idx, c[8:0] ^ {5'b0, lag});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
