// tb_cache_switch: end-to-end test of a 5-port cache switch with one
// behavioural CAM per input port.
//
// Phases (traffic drains between them, since the hash configuration may only
// change while no lookup is in flight):
//  1. k-ary n-cube hash: the switch is node (1,1) of a 3-ary 2-mesh. Ports
//     0..4 are X_{0,+}, X_{0,-}, X_{1,+}, X_{1,-} and the local node. A lone
//     packet measures the latency of a miss and of a hit and checks that a
//     4-flit packet leaves in 4 consecutive cycles; then random packets from
//     all inputs to all nine nodes.
//  2. A failed X_{0,+} link: the X_{0,+} entry is rewritten to port 2 in the
//     caches and the CAM, and packets to column 2 must now leave on port 2.
//  3. Flush and switch to the fat-tree hash (leaf switch of a 2-ary fat tree,
//     down_0/down_1/up_0/up_1 on ports 0..3).
//  4. Flush and switch to the arbitrary-topology CRC hash with a 2-link
//     bundle; the CAM's default table decides the ports.
// Every packet is checked at its output: right port, flits contiguous on
// their output VC, in order, none lost or duplicated. The sinks hold credits
// back at random. Each mechanism is counted and must occur at least once:
// cache hit, cache miss with CAM fill, update, flush, hash switch, VC
// allocation wait, switch allocation conflict, credit stall, LAG member use.
module tb_cache_switch;
  import pfc_pkg::*;
  localparam int P = 5;
  localparam int CAM_LAT = 4;

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
  logic cam_wr = 0;

  int checks = 0, failures = 0;
  int cycle = 0;

  cache_switch #(.NUM_PORTS(P)) dut (.*);

  for (genvar p = 0; p < P; p++) begin : g_cam
    routing_table_cam_model #(.LATENCY(CAM_LAT), .NUM_PORTS(P)) u_cam (
      .clk(clk), .rst_n(rst_n), .req_valid(cam_req_valid[p]), .req_key(cam_req_key[p]),
      .resp_valid(cam_resp_valid[p]), .resp_port(cam_resp_port[p]),
      .wr_en(cam_wr), .wr_key(upd_key), .wr_port(upd_port), .lookups(cam_lookups[p]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // ------------------------------------------------------------ reference
  logic [PORT_W-1:0] camtab [cache_key_t];

  function automatic logic [3:0] ref_crc4(logic [23:0] a);
    logic [27:0] m;
    m = {a, 4'h0};
    for (int i = 27; i >= 4; i--) if (m[i]) m[i-:5] = m[i-:5] ^ 5'h13;
    return m[3:0];
  endfunction

  function automatic cache_key_t ref_key(logic [ADDR_W-1:0] d);
    cache_key_t k;
    k.mode = cfg.mode;
    k.lag  = ref_crc4(d) & 4'((1 << cfg.lag_bits) - 1);
    if (cfg.mode == HASH_KARY) begin
      // 3x3 mesh, switch (1,1); address = row*4 + col
      int col = int'(d) % 4, row = int'(d) / 4;
      if (col > 1)      k.payload = 24'h01;
      else if (col < 1) k.payload = 24'h03;
      else if (row > 1) k.payload = 24'h05;
      else if (row < 1) k.payload = 24'h07;
      else              k.payload = 24'h3C;
    end else if (cfg.mode == HASH_FTREE) begin
      // leaf switch 0 of a 2-ary 4-D fat tree: nodes 0 and 1 are below it
      // up_{d_i} for the highest i (3..0) with d_{i+1} != 0, else down_{d_0}
      k.payload = {15'b0, 1'b0, 7'b0, d[0]};
      for (int i = 0; i <= 3; i++) if (d[i+1]) k.payload = {15'b0, 1'b1, 7'b0, d[i]};
    end else begin
      k.payload = d;
    end
    return k;
  endfunction

  function automatic logic [PORT_W-1:0] ref_port(logic [ADDR_W-1:0] d);
    cache_key_t k = ref_key(d);
    if (camtab.exists(k)) return camtab[k];
    return PORT_W'((k.payload * 7 + k.lag * 3 + k.mode) % P);
  endfunction

  // ------------------------------------------------------------ sources
  typedef struct { int src; int seq; int len; logic [PORT_W-1:0] port; } pkt_t;
  pkt_t pkts [int];                  // by src*65536+seq
  flit_t srcq [P][$];
  int cred [P][NUM_VC];
  int next_vc [P];
  int seqn [P];
  int sent_pkts = 0, rcvd_pkts = 0, lag_seen [2];
  int first_in_cycle, first_out_cycle;

  task automatic queue_packet(int s, logic [ADDR_W-1:0] d, int len);
    int sq = seqn[s]++;
    int v = next_vc[s];
    next_vc[s] = (next_vc[s] + 1) % NUM_VC;
    pkts[s * 65536 + sq] = '{src: s, seq: sq, len: len, port: ref_port(d)};
    lag_seen[ref_key(d).lag[0]]++;
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f.vc   = VC_W'(v);
      f.kind = (len == 1) ? FLIT_HEADTAIL : (i == 0) ? FLIT_HEAD : (i == len - 1) ? FLIT_TAIL : FLIT_BODY;
      f.data = {8'(s), 16'(sq), 8'(i), 8'h00, d};
      srcq[s].push_back(f);
    end
    sent_pkts++;
  endtask

  // drive inputs, obeying credits; flits of one VC stay in order
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < P; p++) begin
      in_valid[p] = 1'b0;
      if (srcq[p].size() != 0 && cred[p][srcq[p][0].vc] > 0) begin
        in_valid[p] = 1'b1;
        in_flit[p]  = srcq[p].pop_front();
        cred[p][in_flit[p].vc]--;
        if (first_in_cycle < 0) first_in_cycle = cycle;
      end
    end
  end

  always @(posedge clk) if (rst_n)
    for (int p = 0; p < P; p++) if (in_cr_valid[p]) cred[p][in_cr_vc[p]]++;

  // ------------------------------------------------------------ sinks
  int hold_prob = 0;                 // percent of cycles a sink holds credits
  int owed [P][NUM_VC];
  int cur_pkt [P][NUM_VC];
  int cur_idx [P][NUM_VC];
  int out_cycles [$];

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < P; p++) begin
      if (out_valid[p]) begin
        flit_t f;
        int v, id;
        f  = out_flit[p];
        v  = int'(f.vc);
        id = int'(f.data[63:56]) * 65536 + int'(f.data[55:40]);
        owed[p][v]++;
        out_cycles.push_back(cycle);
        if (first_out_cycle < 0) first_out_cycle = cycle;
        checks++;
        if (is_head(f.kind)) begin
          if (cur_pkt[p][v] >= 0 || !pkts.exists(id) || pkts[id].port != PORT_W'(p) || f.data[39:32] != 0) begin
            failures++;
            $display("FAIL head on port %0d vc %0d id %h (cycle %0d)", p, v, id, cycle);
          end
          cur_pkt[p][v] = id; cur_idx[p][v] = 0;
        end else if (cur_pkt[p][v] != id || int'(f.data[39:32]) != cur_idx[p][v] + 1) begin
          failures++;
          $display("FAIL body/tail on port %0d vc %0d id %h (cycle %0d)", p, v, id, cycle);
        end else cur_idx[p][v]++;
        if (is_tail(f.kind)) begin
          if (pkts.exists(id) && cur_idx[p][v] != pkts[id].len - 1) begin
            failures++; $display("FAIL length id %h", id);
          end
          pkts.delete(id);
          cur_pkt[p][v] = -1;
          rcvd_pkts++;
        end
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < P; p++) begin
      out_cr_valid[p] = 1'b0;
      if ($urandom_range(0, 99) >= hold_prob)
        for (int v = 0; v < NUM_VC; v++)
          if (!out_cr_valid[p] && owed[p][v] > 0) begin
            out_cr_valid[p] = 1'b1; out_cr_vc[p] = VC_W'(v); owed[p][v]--;
          end
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int n_hit = 0, n_miss = 0, n_upd = 0, n_flush = 0, n_switch = 0;
  int n_va_wait = 0, n_sa_conflict = 0, n_credit_stall = 0;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < P; p++) if (rc_done[p]) begin
      if (rc_hit[p]) n_hit++; else n_miss++;
    end
    for (int o = 0; o < P; o++) if ($countones(dut.u_sa.s2_req[o]) > 1) n_sa_conflict++;
    for (int i = 0; i < P; i++)
      for (int v = 0; v < NUM_VC; v++)
        if (dut.va_req[i][v] && !dut.va_grant[i][v]) n_va_wait++;
  end

  // an active VC with a flit waiting but no downstream credit
  for (genvar i = 0; i < P; i++) begin : g_cs
    always @(posedge clk) if (rst_n)
      for (int v = 0; v < NUM_VC; v++)
        if (dut.g_port[i].u_in.state[v] == 2'd3 && dut.g_port[i].u_in.nonempty[v] && !dut.sa_req[i][v])
          n_credit_stall++;
  end

  task automatic drain();
    int guard = 0;
    while ((rcvd_pkts != sent_pkts) && guard < 20000) begin @(posedge clk); guard++; end
    repeat (10) @(posedge clk);
    chk("all packets delivered", rcvd_pkts == sent_pkts && pkts.size() == 0);
  endtask

  task automatic random_traffic(int npk, logic [ADDR_W-1:0] dsts [$]);
    for (int n = 0; n < npk; n++)
      for (int s = 0; s < P; s++)
        queue_packet(s, dsts[$urandom_range(0, dsts.size() - 1)], $urandom_range(1, 4));
    drain();
  endtask

  task automatic do_flush();
    @(negedge clk); flush = 1; @(negedge clk); flush = 0; n_flush++;
  endtask

  task automatic update(cache_key_t k, logic [PORT_W-1:0] p);
    @(negedge clk);
    upd_key = k; upd_port = p; upd_valid = 1; cam_wr = 1;
    @(negedge clk); cam_wr = 0;
    while (!upd_ready) @(negedge clk);
    upd_valid = 0;
    camtab[k] = p;
    n_upd++;
  endtask

  initial begin
    logic [ADDR_W-1:0] mesh [$];
    logic [ADDR_W-1:0] ftn [$];
    logic [ADDR_W-1:0] any [$];
    first_in_cycle = -1; first_out_cycle = -1;
    for (int p = 0; p < P; p++) begin
      seqn[p] = 0; next_vc[p] = 0;
      for (int v = 0; v < NUM_VC; v++) begin cred[p][v] = BUF_DEPTH; owed[p][v] = 0; cur_pkt[p][v] = -1; cur_idx[p][v] = 0; end
    end
    lag_seen[0] = 0; lag_seen[1] = 0;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) mesh.push_back(24'(r * 4 + c));
    for (int i = 0; i < 16; i++) ftn.push_back(24'(i));
    for (int i = 0; i < 24; i++) any.push_back(24'(i * 52361 + 7));

    cfg = '0;
    cfg.mode = HASH_KARY; cfg.kary_shape = KC_4X12; cfg.kary_k = 9'd3; cfg.kary_cur = 24'h5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the CAM holds the mesh routes
    update('{mode: HASH_KARY, lag: 4'h0, payload: 24'h01}, 6'd0);
    update('{mode: HASH_KARY, lag: 4'h0, payload: 24'h03}, 6'd1);
    update('{mode: HASH_KARY, lag: 4'h0, payload: 24'h05}, 6'd2);
    update('{mode: HASH_KARY, lag: 4'h0, payload: 24'h07}, 6'd3);
    update('{mode: HASH_KARY, lag: 4'h0, payload: 24'h3C}, 6'd4);
    do_flush();               // caches start empty, routes only in the CAM
    n_upd = 0; n_flush = 0;

    // ---- phase 1a: lone packets, latency
    begin
      int t_miss, t_hit;
      first_in_cycle = -1; first_out_cycle = -1;
      queue_packet(0, 24'h6, 1);  // (1,2): X_{0,+}, cache miss
      drain();
      t_miss = first_out_cycle - first_in_cycle;
      first_in_cycle = -1; first_out_cycle = -1;
      out_cycles.delete();
      queue_packet(0, 24'hA, 4);  // (2,2): same entry, hit
      drain();
      t_hit = first_out_cycle - first_in_cycle;
      $display("latency: miss %0d cycles, hit %0d cycles", t_miss, t_hit);
      // link -> buffer, RC 3, VA 1, SA 1, ST 1
      chk("hit latency is 7 cycles", t_hit == 7);
      chk("miss costs the CAM lookup", t_miss >= t_hit + CAM_LAT);
      chk("4 flits in 4 consecutive cycles", out_cycles.size() == 4 && out_cycles[3] - out_cycles[0] == 3);
    end
    // ---- phase 1b: random traffic with credit back-pressure
    hold_prob = 40;
    random_traffic(30, mesh);
    hold_prob = 0;
    random_traffic(20, mesh);

    // ---- phase 2: the X_{0,+} link fails; route column 2 through X_{1,+}
    update('{mode: HASH_KARY, lag: 4'h0, payload: 24'h01}, 6'd2);
    random_traffic(10, mesh);

    // ---- phase 3: fat tree
    do_flush();
    cfg = '0;
    cfg.mode = HASH_FTREE; cfg.ft_bits = 4'd1; cfg.ft_n = 5'd4; cfg.ft_dim = 5'd0; cfg.ft_cur = 24'h0;
    n_switch++;
    update('{mode: HASH_FTREE, lag: 4'h0, payload: 24'h000}, 6'd0);
    update('{mode: HASH_FTREE, lag: 4'h0, payload: 24'h001}, 6'd1);
    update('{mode: HASH_FTREE, lag: 4'h0, payload: 24'h100}, 6'd2);
    update('{mode: HASH_FTREE, lag: 4'h0, payload: 24'h101}, 6'd3);
    do_flush();
    random_traffic(20, ftn);

    // ---- phase 4: arbitrary topology with a 2-link bundle
    do_flush();
    cfg = '0;
    cfg.mode = HASH_ARB; cfg.lag_bits = 3'd1;
    n_switch++;
    hold_prob = 20;
    random_traffic(20, any);

    $display("packets=%0d hits=%0d misses=%0d updates=%0d flushes=%0d switches=%0d va_wait=%0d sa_conflict=%0d credit_stall=%0d lag0=%0d lag1=%0d",
             rcvd_pkts, n_hit, n_miss, n_upd, n_flush, n_switch, n_va_wait, n_sa_conflict, n_credit_stall,
             lag_seen[0], lag_seen[1]);
    chk("cache hits happened", n_hit > 0);
    chk("cache misses happened", n_miss > 0);
    chk("misses match CAM lookups", n_miss == cam_lookups.sum());
    chk("updates happened", n_upd > 0);
    chk("flushes happened", n_flush > 0);
    chk("hash switches happened", n_switch > 0);
    chk("VC allocation waits happened", n_va_wait > 0);
    chk("switch allocation conflicts happened", n_sa_conflict > 0);
    chk("credit stalls happened", n_credit_stall > 0);
    chk("both bundle members used", lag_seen[0] > 0 && lag_seen[1] > 0);
    chk("hits dominate", n_hit > 2 * n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
