// tb_switch_allocator: four ports, two VCs. Checks that every grant answers a
// request of the granted VC, that no input and no output is granted twice in a
// cycle, that the crossbar select names the granted input, that an
// uncontested request is granted at once, and that two inputs fighting for
// one output alternate (round-robin).
module tb_switch_allocator;
  import pfc_pkg::*;
  localparam int P = 4;

  logic clk = 0, rst_n = 0;
  logic [P-1:0][NUM_VC-1:0]             req = '0;
  logic [P-1:0][NUM_VC-1:0][PORT_W-1:0] port = '0;
  logic [P-1:0]                         in_grant, out_valid;
  logic [P-1:0][VC_W-1:0]               in_vc;
  logic [P-1:0][1:0]                    out_sel;
  int checks = 0, failures = 0;

  switch_allocator #(.NUM_PORTS(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic legal();
    int used [P];
    for (int o = 0; o < P; o++) used[o] = 0;
    for (int i = 0; i < P; i++)
      if (in_grant[i]) begin
        int o = int'(port[i][in_vc[i]]);
        chk("grant on request", req[i][in_vc[i]]);
        used[o]++;
        chk("select matches", out_valid[o] && out_sel[o] == 2'(i));
      end
    for (int o = 0; o < P; o++) chk("one input per output", used[o] <= 1);
    for (int o = 0; o < P; o++) if (out_valid[o]) chk("select granted", in_grant[out_sel[o]]);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req[0][1] = 1; port[0][1] = 6'd2;
    #1 chk("uncontested", in_grant[0] && in_vc[0] == 1 && out_valid[2] && out_sel[2] == 0);
    legal();
    // inputs 1 and 3 fight for output 0: they alternate
    req = '0; req[1][0] = 1; port[1][0] = 6'd0; req[3][1] = 1; port[3][1] = 6'd0;
    begin
      logic [1:0] prev;
      @(negedge clk); #1 prev = out_sel[0]; legal();
      for (int t = 0; t < 6; t++) begin
        @(negedge clk); #1;
        legal();
        chk("alternates", out_valid[0] && out_sel[0] != prev);
        prev = out_sel[0];
      end
    end
    // random
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int i = 0; i < P; i++)
        for (int v = 0; v < NUM_VC; v++) begin
          req[i][v]  = $urandom_range(0, 1);
          port[i][v] = PORT_W'($urandom_range(0, P - 1));
        end
      #1 legal();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
