// tb_switchable_hash: checks how the switchable hash forms the cache key and
// set index in each mode: arbitrary (the address itself, CRC index), k-ary
// n-cube (the 6-bit link tag) and fat tree ({up, j}), with and without a
// link-aggregation bundle. Expected values are worked out by hand from the
// topology examples or by long division for the CRCs.
module tb_switchable_hash;
  import pfc_pkg::*;

  hash_cfg_t         cfg;
  logic [ADDR_W-1:0] dst;
  cache_key_t        key;
  logic [IDX_W-1:0]  idx;
  int checks = 0, failures = 0;

  switchable_hash dut (.cfg(cfg), .dst(dst), .key(key), .idx(idx));

  function automatic logic [15:0] ref_crc16(logic [23:0] a);
    logic [39:0] m;
    m = {a, 16'h0} ^ {16'hFFFF, 24'h0};
    for (int i = 39; i >= 16; i--) if (m[i]) m[i-:17] = m[i-:17] ^ 17'h11021;
    return m[15:0];
  endfunction

  function automatic logic [3:0] ref_crc4(logic [23:0] a);
    logic [27:0] m;
    m = {a, 4'h0};
    for (int i = 27; i >= 4; i--) if (m[i]) m[i-:5] = m[i-:5] ^ 5'h13;
    return m[3:0];
  endfunction

  task automatic check(string what, cache_key_t ek, logic [IDX_W-1:0] ei);
    #1;
    checks++;
    if (key !== ek || idx !== ei) begin
      failures++;
      $display("FAIL %s: key=%h exp=%h idx=%h exp=%h", what, key, ek, idx, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    // arbitrary topology, no bundle
    cfg.mode = HASH_ARB;
    for (int t = 0; t < 50; t++) begin
      dst = 24'($urandom);
      check("arb", '{mode: HASH_ARB, lag: 4'h0, payload: dst}, ref_crc16(dst)[8:0]);
    end
    // arbitrary topology, 4-link bundle
    cfg.lag_bits = 3'd2;
    for (int t = 0; t < 50; t++) begin
      logic [3:0] m;
      dst = 24'($urandom);
      m = ref_crc4(dst) & 4'h3;
      check("arb lag", '{mode: HASH_ARB, lag: m, payload: dst}, ref_crc16(dst)[8:0] ^ {5'b0, m});
    end
    // 3-ary 2-mesh in the 4^12 shape, switch (1,1), destination (2,2): X_{0,+}
    cfg = '0;
    cfg.mode = HASH_KARY; cfg.kary_shape = KC_4X12; cfg.kary_k = 9'd3; cfg.kary_cur = 24'h5;
    dst = 24'hA;
    check("kary", '{mode: HASH_KARY, lag: 4'h0, payload: 24'h01}, 9'h001);
    dst = 24'h9;  // (2,1): X_{1,+} = tag 000101
    check("kary X1+", '{mode: HASH_KARY, lag: 4'h0, payload: 24'h05}, 9'h005);
    cfg.lag_bits = 3'd3;
    dst = 24'h9;
    begin
      logic [3:0] m;
      m = ref_crc4(24'h9) & 4'h7;
      check("kary lag", '{mode: HASH_KARY, lag: m, payload: 24'h05}, {m[2:0], 6'h05});
    end
    // 2-ary 4-D fat tree, layer-1 switch 10000
    cfg = '0;
    cfg.mode = HASH_FTREE; cfg.ft_bits = 4'd1; cfg.ft_n = 5'd4; cfg.ft_dim = 5'd1; cfg.ft_cur = 24'h0;
    dst = 24'b00011;
    check("ftree down_1", '{mode: HASH_FTREE, lag: 4'h0, payload: 24'h001}, 9'h001);
    dst = 24'b00100;
    check("ftree up_0",   '{mode: HASH_FTREE, lag: 4'h0, payload: 24'h100}, 9'h010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
