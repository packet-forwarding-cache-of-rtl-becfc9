// tb_hit_rate_workloads: hit-rate workloads for one input port's routing
// computation unit at its full size (2,048 entries, four ways), with a
// behavioural CAM that answers in 6 cycles (about a 4 ns TCAM at a 0.72 ns
// stage; the latency is this bench's choice).
//
// Random (all-to-all style) traffic is streamed at one lookup per cycle:
//  1. 64-ary 4-torus (16.7 M nodes) with the k-ary n-cube hash. A plain
//     address cache would almost never hit here. With the topology hash
//     every key may miss only once: at most 4 x 4 + 1 = 17 misses.
//  2. The same torus with 4-link bundles: at most 17 x 4 misses.
//  3. 16-ary 3-level fat tree (the Dragonfly configuration), leaf switch:
//     at most 2k = 32 misses.
//  4. Arbitrary-topology CRC hash, 256 destinations (the node count of an
//     8x8x4 torus) visited in random order 8 times: only the 256 initial
//     misses, no conflict misses.
//  5. CRC hash, 2,048 random destinations, uniform traffic: the share of
//     misses caused by replacement is printed (conflicts do occur once the
//     cache is full; no bound is checked).
// For every phase: results come back in order, one per request; a
// destination always gets the same port; a miss returns the CAM's port; no
// key is fetched from the CAM twice between flushes (phases 1-4); the
// streaming rate reaches one result per cycle once the cache is warm.
module tb_hit_rate_workloads;
  import pfc_pkg::*;

  localparam int CAM_LAT = 6;

  logic clk = 0, rst_n = 0, flush = 0;
  hash_cfg_t cfg;
  logic req_valid = 0, req_ready;
  logic [ADDR_W-1:0] req_dst = '0;
  logic [VC_W-1:0] req_id = '0, res_id;
  logic upd_valid = 0, upd_ready;
  cache_key_t upd_key = '0, cam_req_key;
  logic [PORT_W-1:0] upd_port = '0, res_port, cam_resp_port;
  logic res_valid, res_hit, cam_req_valid, cam_resp_valid;
  int unsigned cam_lookups;
  int checks = 0, failures = 0;

  routing_computation_unit dut (.*);

  routing_table_cam_model #(.LATENCY(CAM_LAT)) u_cam (
    .clk(clk), .rst_n(rst_n), .req_valid(cam_req_valid), .req_key(cam_req_key),
    .resp_valid(cam_resp_valid), .resp_port(cam_resp_port),
    .wr_en(1'b0), .wr_key(upd_key), .wr_port(upd_port), .lookups(cam_lookups));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors
  logic [ADDR_W-1:0] sent_q[$];
  logic [PORT_W-1:0] port_of [logic [ADDR_W-1:0]];
  int                fetched [cache_key_t];
  int results = 0, hits = 0, misses = 0, refetch = 0, bad = 0;
  logic              resp_q = 0;      // the CAM answer, one cycle later
  logic [PORT_W-1:0] resp_port_q = '0;

  always @(posedge clk) if (rst_n) begin
    resp_q      <= cam_resp_valid;
    resp_port_q <= cam_resp_port;
    if (cam_resp_valid) begin
      if (fetched.exists(cam_req_key)) refetch++;
      else fetched[cam_req_key] = 1;
    end
    if (res_valid) begin
      logic [ADDR_W-1:0] d;
      results++;
      if (sent_q.size() == 0) begin
        bad++; $display("FAIL result with no request");
      end else begin
        d = sent_q.pop_front();
        if (res_hit) hits++;
        else begin
          misses++;
          if (!resp_q || res_port !== resp_port_q) begin
            bad++; $display("FAIL miss result is not the CAM's answer");
          end
        end
        if (port_of.exists(d) && port_of[d] !== res_port) begin
          bad++; $display("FAIL dst %h: port %0d, earlier %0d", d, res_port, port_of[d]);
        end
        port_of[d] = res_port;
      end
    end
  end

  // ---- stimulus helpers
  typedef enum int { SEL_TORUS, SEL_FTREE, SEL_NPB, SEL_UNIFORM } sel_e;
  task automatic issue(logic [ADDR_W-1:0] d);
    req_valid = 1; req_dst = d; req_id = ~req_id;
    do @(posedge clk); while (!req_ready);
    sent_q.push_back(d);
    #1 req_valid = 0;
  endtask

  task automatic drain();
    while (sent_q.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
    #1;
  endtask

  task automatic new_phase();
    drain();
    flush = 1; @(posedge clk); #1 flush = 0;
    fetched.delete(); port_of.delete();
    results = 0; hits = 0; misses = 0; refetch = 0; bad = 0;
  endtask

  // Streams n random lookups; returns the cycles taken by the last quarter,
  // when the cache should be warm.
  task automatic stream(int n, sel_e sel, output int warm_cycles);
    int t0 = 0;
    for (int i = 0; i < n; i++) begin
      if (i == 3 * n / 4) t0 = $time / 10;
      issue(pick(sel));
    end
    warm_cycles = $time / 10 - t0;
  endtask

  logic [ADDR_W-1:0] npb_order[$];

  function automatic logic [ADDR_W-1:0] pick(sel_e sel);
    unique case (sel)
      SEL_TORUS:   return ADDR_W'($urandom);                         // 64^4: any 24 bits
      SEL_FTREE:   return ADDR_W'($urandom_range(0, 16'hFFFF));      // (d_3..d_0), 4-bit digits
      SEL_UNIFORM: return ADDR_W'($urandom_range(0, 2047)) * 24'd4099 + 24'h1234;
      default:     return npb_order.pop_front();
    endcase
  endfunction

  task automatic judge(string name, int n, int max_miss, bit no_refetch, int warm_cycles, int warm_n);
    checks++;
    if (results != n || bad != 0) begin
      failures++; $display("FAIL %s: %0d results of %0d, %0d bad", name, results, n, bad);
    end
    checks++;
    if (max_miss >= 0 && misses > max_miss) begin
      failures++; $display("FAIL %s: %0d misses, at most %0d expected", name, misses, max_miss);
    end
    checks++;
    if (no_refetch && refetch != 0) begin
      failures++; $display("FAIL %s: %0d keys fetched twice", name, refetch);
    end
    checks++;
    if (max_miss >= 0 && warm_cycles > warm_n + warm_n / 50 + CAM_LAT + 4) begin
      failures++; $display("FAIL %s: %0d lookups took %0d cycles when warm", name, warm_n, warm_cycles);
    end
    $display("%s: lookups=%0d hits=%0d misses=%0d refetched=%0d hit_rate=%0d.%02d%%",
             name, n, hits, misses, refetch, hits * 100 / n, (hits * 10000 / n) % 100);
  endtask

  initial begin
    int wc;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // 1. 64-ary 4-torus, switch at a random position
    new_phase();
    cfg.mode = HASH_KARY; cfg.kary_shape = KC_64X4; cfg.kary_k = 9'd64;
    cfg.kary_cur = ADDR_W'($urandom); cfg.lag_bits = 3'd0;
    stream(20000, SEL_TORUS, wc); drain();
    judge("64-ary 4-torus", 20000, 17, 1, wc, 5000);

    // 2. same torus, every link a bundle of 4
    new_phase();
    cfg.lag_bits = 3'd2;
    stream(20000, SEL_TORUS, wc); drain();
    judge("64-ary 4-torus, 4-link bundles", 20000, 17 * 4, 1, wc, 5000);

    // 3. 16-ary 3-level fat tree (Dragonfly setting), leaf switch
    new_phase();
    cfg.mode = HASH_FTREE; cfg.lag_bits = 3'd0;
    cfg.ft_bits = 4'd4; cfg.ft_n = 5'd3; cfg.ft_dim = 5'd0; cfg.ft_cur = ADDR_W'($urandom_range(0, 12'hFFF));
    stream(20000, SEL_FTREE, wc); drain();
    judge("16-ary fat tree, leaf", 20000, 32, 1, wc, 5000);

    // 4. CRC hash, 256 destinations visited 8 times in random order
    new_phase();
    cfg.mode = HASH_ARB;
    for (int pass = 0; pass < 8; pass++) begin
      logic [ADDR_W-1:0] perm[256];
      for (int i = 0; i < 256; i++) perm[i] = ADDR_W'(i);
      perm.shuffle();
      foreach (perm[i]) npb_order.push_back(perm[i]);
    end
    stream(2048, SEL_NPB, wc); drain();
    judge("CRC hash, 256 destinations", 2048, 256, 1, wc, 512);

    // 5. CRC hash, 2,048 destinations, uniform traffic: report only
    new_phase();
    stream(20000, SEL_UNIFORM, wc); drain();
    judge("CRC hash, 2048 destinations (uniform)", 20000, -1, 0, wc, 5000);
    $display("replacement share of lookups: %0d.%02d%%", refetch * 100 / 20000, (refetch * 10000 / 20000) % 100);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
