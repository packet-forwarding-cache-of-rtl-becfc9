// tb_input_unit: one input unit of a 4-port switch. The testbench plays the
// routing computation unit (answers 3 cycles after a request), the VC
// allocator and the switch allocator (grants whenever asked). It sends a
// 3-flit packet on VC 1 and a 1-flit packet on VC 0 and checks: one RC request
// per packet carrying the head's destination, VA requests for the routed
// port, SA requests only while the downstream credit is there, flits leaving
// in order with the output VC written in, one upstream credit per flit, and
// the VC going back to idle after the tail so the next packet is routed.
module tb_input_unit;
  import pfc_pkg::*;
  localparam int P = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, cr_valid, rc_req_valid, rc_req_ready = 1, rc_res_valid = 0;
  flit_t in_flit = '0, xb_flit;
  logic [VC_W-1:0] cr_vc, rc_req_id, rc_res_id = '0, sa_vc = '0;
  logic [ADDR_W-1:0] rc_req_dst;
  logic [PORT_W-1:0] rc_res_port = '0;
  logic [NUM_VC-1:0] va_req, va_grant = '0, sa_req;
  logic [NUM_VC-1:0][PORT_W-1:0] va_port, sa_port;
  logic [NUM_VC-1:0][VC_W-1:0] va_outvc = '0;
  logic [P-1:0][NUM_VC-1:0] cred_avail = '1;
  logic sa_grant = 0, xb_valid;
  int checks = 0, failures = 0;
  int rc_reqs = 0, credits = 0, sa_blocked = 0;
  flit_t got [$];

  input_unit #(.NUM_PORTS(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // routing computation: destination 0x00ABC0 -> port 2, 0x000011 -> port 3
  logic [2:0] rc_delay [$];
  logic [VC_W-1:0] rc_idq [$];
  logic [ADDR_W-1:0] rc_dq [$];
  always @(posedge clk) if (rst_n) begin
    rc_res_valid <= 1'b0;
    if (rc_req_valid && rc_req_ready) begin
      rc_reqs++;
      rc_idq.push_back(rc_req_id); rc_dq.push_back(rc_req_dst); rc_delay.push_back(3'd2);
    end
    if (rc_delay.size() != 0) begin
      if (rc_delay[0] == 0) begin
        void'(rc_delay.pop_front());
        rc_res_valid <= 1'b1;
        rc_res_id    <= rc_idq.pop_front();
        rc_res_port  <= (rc_dq.pop_front() == 24'h00ABC0) ? 6'd2 : 6'd3;
      end else rc_delay[0] = rc_delay[0] - 1;
    end
  end

  // VA and SA: grant what is asked; VC 1 gets output VC 0, VC 0 gets output VC 1
  always_comb begin
    va_grant = va_req;
    va_outvc[0] = 1'b1;
    va_outvc[1] = 1'b0;
    sa_grant = 1'b0; sa_vc = '0;
    for (int v = NUM_VC - 1; v >= 0; v--) if (sa_req[v]) begin sa_grant = 1'b1; sa_vc = VC_W'(v); end
  end

  always @(posedge clk) if (rst_n) begin
    if (xb_valid) got.push_back(xb_flit);
    if (cr_valid) credits++;
    if (dut.state[1] == 2'd3 && !cred_avail[2][0] && sa_req[1]) sa_blocked++;
  end

  task automatic send(flit_kind_e k, logic v, logic [63:0] d);
    @(negedge clk);
    in_valid = 1; in_flit = '{kind: k, vc: v, data: d};
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // withhold the downstream credit of port 2 VC 0 for a while
    cred_avail[2][0] = 1'b0;
    send(FLIT_HEAD, 1'b1, 64'h00ABC0);
    send(FLIT_BODY, 1'b1, 64'h1111);
    send(FLIT_TAIL, 1'b1, 64'h2222);
    send(FLIT_HEADTAIL, 1'b0, 64'h000011);
    repeat (10) @(negedge clk);
    chk("stalled without credit", got.size() == 1 && got[0].data == 64'h000011 && got[0].vc == 1'b1);
    cred_avail[2][0] = 1'b1;
    repeat (6) @(negedge clk);
    chk("four flits out", got.size() == 4);
    if (got.size() == 4) begin
      chk("head",  got[1].kind == FLIT_HEAD && got[1].data == 64'h00ABC0 && got[1].vc == 1'b0);
      chk("body",  got[2].data == 64'h1111 && got[2].vc == 1'b0);
      chk("tail",  got[3].kind == FLIT_TAIL && got[3].data == 64'h2222);
    end
    chk("two RC requests", rc_reqs == 2);
    chk("credits returned", credits == 4);
    chk("idle again", dut.state[0] == 2'd0 && dut.state[1] == 2'd0);
    // the same VC carries a second packet
    send(FLIT_HEADTAIL, 1'b1, 64'h000011);
    repeat (8) @(negedge clk);
    chk("second packet", got.size() == 5 && got[4].data == 64'h000011 && rc_reqs == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
