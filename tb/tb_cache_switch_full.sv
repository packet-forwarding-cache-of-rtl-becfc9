// tb_cache_switch_full: the cache switch at its default size (64 ports, 2,048
// entry caches) taking packets end to end, with one behavioural CAM per input
// port. Hash: k-ary n-cube, switch (1,1) of a 3-ary 2-mesh. Three 4-flit
// packets are sent: input 0 -> node (1,2) (cache miss, CAM lookup), input 63
// -> node (2,2) (miss in input 63's own cache), then input 0 -> node (0,2)
// (hit on the shared X_{0,+} entry, 7-cycle latency). Each must leave whole,
// in order, on the port the CAM gives for X_{0,+}, and credits must return.
module tb_cache_switch_full;
  import pfc_pkg::*;
  localparam int P = 64;

  logic clk = 0, rst_n = 0;
  hash_cfg_t cfg;
  logic flush = 0, upd_valid = 0, upd_ready;
  cache_key_t upd_key = '0;
  logic [PORT_W-1:0] upd_port = '0;
  logic  [P-1:0]            in_valid = '0, in_cr_valid, out_valid, out_cr_valid = '0;
  flit_t [P-1:0]            in_flit = '0, out_flit;
  logic  [P-1:0][VC_W-1:0]  in_cr_vc, out_cr_vc = '0;
  logic       [P-1:0]              cam_req_valid, cam_resp_valid;
  cache_key_t [P-1:0]              cam_req_key;
  logic       [P-1:0][PORT_W-1:0]  cam_resp_port;
  logic  [P-1:0]            rc_done, rc_hit;
  int unsigned cam_lookups [P];
  int checks = 0, failures = 0, cycle = 0;
  int hits = 0, misses = 0, credits_back = 0;
  flit_t got [$];
  int got_t [$];

  cache_switch dut (.*);

  for (genvar p = 0; p < P; p++) begin : g_cam
    routing_table_cam_model #(.LATENCY(4), .NUM_PORTS(P)) u_cam (
      .clk(clk), .rst_n(rst_n), .req_valid(cam_req_valid[p]), .req_key(cam_req_key[p]),
      .resp_valid(cam_resp_valid[p]), .resp_port(cam_resp_port[p]),
      .wr_en(1'b0), .wr_key(upd_key), .wr_port(upd_port), .lookups(cam_lookups[p]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // X_{0,+} key {HASH_KARY, lag 0, tag 1}: the CAM model's default port
  localparam logic [PORT_W-1:0] EXP_PORT = PORT_W'((1 * 7 + 0 * 3 + 1) % P);

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < P; p++) begin
      if (rc_done[p]) begin if (rc_hit[p]) hits++; else misses++; end
      if (in_cr_valid[p]) credits_back++;
      if (out_valid[p]) begin
        checks++;
        if (p != int'(EXP_PORT)) begin failures++; $display("FAIL flit on port %0d", p); end
        got.push_back(out_flit[p]);
        got_t.push_back(cycle);
      end
    end
  end

  // sink returns a credit for every flit
  always @(negedge clk) begin
    out_cr_valid = '0;
    for (int p = 0; p < P; p++) if (out_valid[p]) begin out_cr_valid[p] = 1'b1; out_cr_vc[p] = out_flit[p].vc; end
  end

  task automatic send_packet(int p, logic [ADDR_W-1:0] d, int tag, output int t0);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      in_valid[p] = 1'b1;
      in_flit[p]  = '{kind: (i == 0) ? FLIT_HEAD : (i == 3) ? FLIT_TAIL : FLIT_BODY, vc: 1'b0,
                      data: {8'(tag), 8'(i), 24'h0, d}};
      if (i == 0) t0 = cycle;
    end
    @(negedge clk);
    in_valid[p] = 1'b0;
  endtask

  task automatic expect_packet(int tag, int n0);
    chk("four flits", got.size() == n0 + 4);
    if (got.size() == n0 + 4)
      for (int i = 0; i < 4; i++)
        chk("flit order", got[n0 + i].data[63:56] == 8'(tag) && got[n0 + i].data[55:48] == 8'(i)
                          && got_t[n0 + i] == got_t[n0] + i);
  endtask

  initial begin
    int t0;
    cfg = '0;
    cfg.mode = HASH_KARY; cfg.kary_shape = KC_4X12; cfg.kary_k = 9'd3; cfg.kary_cur = 24'h5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_packet(0, 24'h6, 1, t0);
    repeat (30) @(posedge clk);
    expect_packet(1, 0);
    send_packet(63, 24'hA, 2, t0);
    repeat (30) @(posedge clk);
    expect_packet(2, 4);
    send_packet(0, 24'h2, 3, t0);
    repeat (30) @(posedge clk);
    expect_packet(3, 8);
    if (got_t.size() == 12) chk("hit latency 7", got_t[8] - t0 == 7);
    chk("two misses, one hit", misses == 2 && hits == 1);
    chk("CAM asked twice", cam_lookups[0] == 1 && cam_lookups[63] == 1);
    chk("credits returned upstream", credits_back == 12);
    $display("hits=%0d misses=%0d flits=%0d", hits, misses, got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
