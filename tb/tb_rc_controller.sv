// tb_rc_controller: drives the compare-stage inputs of the controller and
// checks, cycle by cycle, a hit (result, no stall), an update (write into the
// hit way or the victim way, no result), and a miss (stall, CAM request held
// until the response, then a write of the CAM's port into the victim way and a
// miss result in the response cycle).
module tb_rc_controller;
  import pfc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic c_valid = 0, c_upd = 0, c_hit = 0;
  cache_key_t c_key = '0;
  logic [PORT_W-1:0] c_upd_port = '0, c_hit_port = '0, wr_port, res_port, cam_resp_port = '0;
  logic [WAY_W-1:0]  c_hit_way = '0, c_victim = '0, wr_way;
  logic stall, wr_en, res_fire, res_hit, cam_req_valid, cam_resp_valid = 0;
  cache_key_t cam_req_key;
  int checks = 0, failures = 0;

  rc_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(string what, logic e_stall, logic e_wr, logic e_fire, logic e_hit,
                            logic [PORT_W-1:0] e_port, logic e_cam);
    #1;
    checks++;
    if (stall !== e_stall || wr_en !== e_wr || res_fire !== e_fire || cam_req_valid !== e_cam
        || (e_fire && (res_hit !== e_hit || res_port !== e_port))
        || (e_wr && wr_port !== e_port)) begin
      failures++;
      $display("FAIL %s: stall=%b wr=%b fire=%b hit=%b port=%0d/%0d cam=%b", what, stall, wr_en,
               res_fire, res_hit, res_port, wr_port, cam_req_valid);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // idle
    expect_out("idle", 0, 0, 0, 0, 0, 0);
    // hit
    c_valid = 1; c_hit = 1; c_hit_port = 6'd12; c_hit_way = 2'd3;
    expect_out("hit", 0, 0, 1, 1, 6'd12, 0);
    // update into the hit way
    c_upd = 1; c_upd_port = 6'd40;
    expect_out("update hit", 0, 1, 0, 0, 6'd40, 0);
    checks++; if (wr_way !== 2'd3) begin failures++; $display("FAIL update way %0d", wr_way); end
    // update of an absent key goes to the victim
    c_hit = 0; c_victim = 2'd1;
    expect_out("update miss", 0, 1, 0, 0, 6'd40, 0);
    checks++; if (wr_way !== 2'd1) begin failures++; $display("FAIL update victim %0d", wr_way); end
    // miss
    c_upd = 0; c_key = '{mode: HASH_KARY, lag: 4'h1, payload: 24'h5};
    expect_out("miss detect", 1, 0, 0, 0, 0, 0);
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      expect_out("miss wait", 1, 0, 0, 0, 0, 1);
      checks++; if (cam_req_key !== c_key) begin failures++; $display("FAIL cam key"); end
      @(negedge clk);
    end
    cam_resp_valid = 1; cam_resp_port = 6'd21; c_victim = 2'd2;
    expect_out("miss fill", 0, 1, 1, 0, 6'd21, 1);
    checks++; if (wr_way !== 2'd2) begin failures++; $display("FAIL fill way %0d", wr_way); end
    @(negedge clk);
    cam_resp_valid = 0; c_hit = 1; c_hit_port = 6'd21;
    expect_out("after fill hit", 0, 0, 1, 1, 6'd21, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
