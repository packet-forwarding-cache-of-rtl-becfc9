// tb_routing_computation_unit: runs the routing computation unit with a
// behavioural CAM (4-cycle lookups). It checks, against a model that tracks
// which keys are cached:
//  - k-ary mode, 3-ary 2-mesh at switch (1,1): the first packet to column 2
//    misses and is answered by the CAM, later ones to any row of column 2 hit
//  - back-to-back hits: one result per cycle, 3 cycles after acceptance
//  - an update of the X_{0,+} entry (a failed link) changes the port with no
//    CAM access; after a flush the same key misses again
//  - arbitrary mode: random addresses miss once, then hit
// Results must come back in order with their ids.
module tb_routing_computation_unit;
  import pfc_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0;
  hash_cfg_t cfg;
  logic req_valid = 0, req_ready;
  logic [ADDR_W-1:0] req_dst = '0;
  logic [VC_W-1:0] req_id = '0, res_id;
  logic upd_valid = 0, upd_ready;
  cache_key_t upd_key = '0, cam_req_key;
  logic [PORT_W-1:0] upd_port = '0, res_port, cam_resp_port;
  logic res_valid, res_hit, cam_req_valid, cam_resp_valid;
  logic cam_wr = 0;
  int unsigned cam_lookups;
  int checks = 0, failures = 0;
  int cycle = 0;

  routing_computation_unit dut (.*);

  routing_table_cam_model #(.LATENCY(4)) u_cam (
    .clk(clk), .rst_n(rst_n), .req_valid(cam_req_valid), .req_key(cam_req_key),
    .resp_valid(cam_resp_valid), .resp_port(cam_resp_port),
    .wr_en(cam_wr), .wr_key(upd_key), .wr_port(upd_port), .lookups(cam_lookups));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [VC_W-1:0] id; logic [PORT_W-1:0] port; logic hit; int t; } exp_t;
  exp_t exp_q[$];
  logic [PORT_W-1:0] cached [cache_key_t];
  logic [PORT_W-1:0] camtab [cache_key_t];
  int hit_lat_bad = 0, hits = 0, misses = 0;
  logic lat_check = 0;

  function automatic logic [PORT_W-1:0] cam_port(cache_key_t k);
    if (camtab.exists(k)) return camtab[k];
    return PORT_W'((k.payload * 7 + k.lag * 3 + k.mode) % 64);
  endfunction

  function automatic cache_key_t kary_key(logic [5:0] tag);
    return '{mode: HASH_KARY, lag: 4'h0, payload: {18'h0, tag}};
  endfunction

  // monitor
  always @(posedge clk) if (rst_n && res_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected result");
    end else begin
      e = exp_q.pop_front();
      if (res_id !== e.id || res_port !== e.port || res_hit !== e.hit) begin
        failures++;
        $display("FAIL result id=%0d port=%0d hit=%b exp id=%0d port=%0d hit=%b", res_id, res_port,
                 res_hit, e.id, e.port, e.hit);
      end
      if (e.hit) begin
        hits++;
        if (lat_check && cycle - e.t != 2) begin hit_lat_bad++; $display("FAIL hit latency %0d", cycle - e.t); end
      end else misses++;
    end
  end

  // issue one lookup; the key it should produce is given
  task automatic lookup(logic [ADDR_W-1:0] d, cache_key_t k, logic [VC_W-1:0] id);
    exp_t e;
    req_valid = 1; req_dst = d; req_id = id;
    do @(posedge clk); while (!req_ready);
    e.id = id; e.t = cycle + 1; e.hit = cached.exists(k);
    e.port = e.hit ? cached[k] : cam_port(k);
    cached[k] = e.port;
    exp_q.push_back(e);
    #1 req_valid = 0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(posedge clk);
    #1;
  endtask

  initial begin
    cfg = '0;
    cfg.mode = HASH_KARY; cfg.kary_shape = KC_4X12; cfg.kary_k = 9'd3; cfg.kary_cur = 24'h5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // column 2 from switch (1,1): one miss then hits on the shared entry
    lookup(24'h2, kary_key(6'h01), 0);
    lookup(24'h6, kary_key(6'h01), 1);
    lookup(24'hA, kary_key(6'h01), 0);
    drain();
    checks++;
    if (cam_lookups != 1) begin failures++; $display("FAIL cam lookups %0d", cam_lookups); end
    // warm the other directions, then stream back-to-back hits
    lookup(24'h4, kary_key(6'h03), 0);
    lookup(24'h9, kary_key(6'h05), 0);
    lookup(24'h1, kary_key(6'h07), 0);
    lookup(24'h5, kary_key(6'h3C), 0);
    drain();
    begin
      int t0, n0;
      t0 = cycle; n0 = hits; lat_check = 1;
      for (int i = 0; i < 20; i++) begin
        logic [ADDR_W-1:0] d;
        logic [5:0] tg;
        case (i % 5)
          0: begin d = 24'h2; tg = 6'h01; end
          1: begin d = 24'h4; tg = 6'h03; end
          2: begin d = 24'h9; tg = 6'h05; end
          3: begin d = 24'h1; tg = 6'h07; end
          default: begin d = 24'h5; tg = 6'h3C; end
        endcase
        lookup(d, kary_key(tg), VC_W'(i));
      end
      drain();
      lat_check = 0;
      checks++;
      if (hits - n0 != 20 || cycle - t0 > 20 + 4) begin
        failures++; $display("FAIL streaming: %0d hits in %0d cycles", hits - n0, cycle - t0);
      end
    end
    // failed link: X_{0,+} now leaves through port 50 (cache and CAM updated)
    upd_key = kary_key(6'h01); upd_port = 6'd50; upd_valid = 1; cam_wr = 1;
    do @(posedge clk); while (!upd_ready);
    #1 upd_valid = 0; cam_wr = 0;
    camtab[upd_key] = 6'd50; cached[upd_key] = 6'd50;
    begin
      int c0;
      c0 = cam_lookups;
      lookup(24'h6, kary_key(6'h01), 1);
      drain();
      checks++;
      if (cam_lookups != c0) begin failures++; $display("FAIL update went to CAM"); end
    end
    // flush: everything misses again
    flush = 1; @(posedge clk); #1 flush = 0;
    cached.delete();
    lookup(24'hA, kary_key(6'h01), 0);
    lookup(24'h4, kary_key(6'h03), 1);
    drain();
    // switch to the arbitrary-topology hash
    flush = 1; @(posedge clk); #1 flush = 0;
    cached.delete();
    cfg.mode = HASH_ARB;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 16; i++) begin
        logic [ADDR_W-1:0] d;
        d = 24'(i * 40503 + 11);
        lookup(d, '{mode: HASH_ARB, lag: 4'h0, payload: d}, VC_W'(i));
      end
    drain();
    repeat (5) @(posedge clk);
    checks++;
    if (hit_lat_bad != 0 || misses != 23 || hits != 39 || cam_lookups != 23) begin
      failures++; $display("FAIL summary hits=%0d misses=%0d latbad=%0d", hits, misses, hit_lat_bad);
    end
    $display("hits=%0d misses=%0d cam_lookups=%0d", hits, misses, cam_lookups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
