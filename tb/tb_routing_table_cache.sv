// tb_routing_table_cache: drives the cache's read, compare and write ports
// directly. It fills all four ways of one set, reads them back, checks the
// victim choice (first invalid way, then round-robin), the forwarding of a
// write into a read of the same set at the same edge, an overwrite, and that
// flush empties the cache in one cycle. A small model of the cache contents
// gives the expected hits.
module tb_routing_table_cache;
  import pfc_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0;
  logic [IDX_W-1:0]  rd_idx = '0, cmp_idx = '0, wr_idx = '0;
  cache_key_t        cmp_key = '0, wr_key = '0;
  logic              hit, wr_en = 0;
  logic [WAY_W-1:0]  hit_way, victim, wr_way = '0;
  logic [PORT_W-1:0] hit_port, wr_port = '0;
  int checks = 0, failures = 0;

  routing_table_cache dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cache_key_t mk(int n);
    return '{mode: HASH_ARB, lag: 4'(n), payload: 24'(n * 977)};
  endfunction

  // read set s at the next edge, compare with k in the following cycle
  task automatic lookup(int s, cache_key_t k, logic exp_hit, logic [PORT_W-1:0] exp_port, string what);
    rd_idx = IDX_W'(s);
    @(posedge clk); #1;
    cmp_idx = IDX_W'(s); cmp_key = k;
    #1;
    checks++;
    if (hit !== exp_hit || (exp_hit && hit_port !== exp_port)) begin
      failures++;
      $display("FAIL %s: hit=%b port=%0d exp %b/%0d", what, hit, hit_port, exp_hit, exp_port);
    end
  endtask

  task automatic write(int s, int w, cache_key_t k, logic [PORT_W-1:0] p);
    wr_en = 1; wr_idx = IDX_W'(s); wr_way = WAY_W'(w); wr_key = k; wr_port = p;
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  task automatic expect_victim(int v, string what);
    #1;
    checks++;
    if (victim !== WAY_W'(v)) begin
      failures++;
      $display("FAIL %s: victim=%0d exp=%0d", what, victim, v);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    lookup(7, mk(1), 0, 0, "empty");
    expect_victim(0, "victim empty");
    for (int w = 0; w < 4; w++) begin
      cmp_idx = 9'd7;
      expect_victim(w, "victim first invalid");
      write(7, w, mk(w + 1), PORT_W'(10 + w));
    end
    for (int w = 0; w < 4; w++) lookup(7, mk(w + 1), 1, PORT_W'(10 + w), "read back");
    lookup(8, mk(1), 0, 0, "other set");
    // full set: round-robin pointer, advanced by the fills of ways 0..3
    cmp_idx = 9'd7; expect_victim(0, "rr after full");
    write(7, 0, mk(9), 6'd33);
    cmp_idx = 9'd7; expect_victim(1, "rr advanced");
    lookup(7, mk(1), 0, 0, "evicted");
    lookup(7, mk(9), 1, 6'd33, "new entry");
    // write and read of the same set at one edge: forwarded
    rd_idx = 9'd7;
    wr_en = 1; wr_idx = 9'd7; wr_way = 2'd2; wr_key = mk(3); wr_port = 6'd44;
    @(posedge clk); #1;
    wr_en = 0; cmp_idx = 9'd7; cmp_key = mk(3);
    #1; checks++;
    if (!hit || hit_port !== 6'd44) begin failures++; $display("FAIL forward: hit=%b port=%0d", hit, hit_port); end
    lookup(7, mk(3), 1, 6'd44, "after forward");
    // flush
    flush = 1; @(posedge clk); #1; flush = 0;
    for (int w = 0; w < 4; w++) lookup(7, mk(w + 1), 0, 0, "flushed");
    lookup(7, mk(9), 0, 0, "flushed new");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
