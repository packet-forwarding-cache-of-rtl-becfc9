// tb_output_unit: checks the one-cycle switch traversal register, the credit
// counters (BUF_DEPTH flits may be sent on a VC, then no more until a credit
// returns) and the output-VC busy flag (set by allocation, cleared by the
// tail flit).
module tb_output_unit;
  import pfc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic xb_valid = 0, alloc_valid = 0, out_valid, cr_valid = 0;
  flit_t xb_flit = '0, out_flit;
  logic [VC_W-1:0] alloc_vc = '0, cr_vc = '0;
  logic [NUM_VC-1:0] cred_avail, vc_busy;
  int checks = 0, failures = 0;

  output_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset credits", cred_avail == '1 && vc_busy == '0);
    alloc_valid = 1; alloc_vc = 1;
    @(negedge clk);
    alloc_valid = 0;
    chk("busy set", vc_busy == 2'b10);
    for (int i = 0; i < BUF_DEPTH; i++) begin
      chk("credit before send", cred_avail[1]);
      xb_valid = 1;
      xb_flit = '{kind: (i == 0) ? FLIT_HEAD : FLIT_BODY, vc: 1'b1, data: 64'(100 + i)};
      @(negedge clk);
      chk("registered flit", out_valid && out_flit.data == 64'(100 + i) && out_flit.vc == 1'b1);
    end
    xb_valid = 0;
    @(negedge clk);
    chk("out idle", !out_valid);
    chk("credits used up", cred_avail == 2'b01);
    cr_valid = 1; cr_vc = 1;
    @(negedge clk);
    cr_valid = 0;
    chk("credit back", cred_avail == 2'b11);
    xb_valid = 1; xb_flit = '{kind: FLIT_TAIL, vc: 1'b1, data: 64'd7};
    @(negedge clk);
    xb_valid = 0;
    chk("tail frees vc", vc_busy == 2'b00 && cred_avail == 2'b01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
