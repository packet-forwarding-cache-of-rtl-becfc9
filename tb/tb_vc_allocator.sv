// tb_vc_allocator: four ports, two VCs each. A model of the output VCs' busy
// flags is kept in the testbench. Checks: a lone request gets the lowest free
// VC at once; several inputs asking for one output are served one per cycle
// with distinct VCs; with no free VC nobody is granted until one is freed;
// random traffic never hands out a busy VC or two VCs of one port per cycle.
module tb_vc_allocator;
  import pfc_pkg::*;
  localparam int P = 4;

  logic clk = 0, rst_n = 0;
  logic [P-1:0][NUM_VC-1:0]             req = '0, grant, vc_busy = '0;
  logic [P-1:0][NUM_VC-1:0][PORT_W-1:0] port = '0;
  logic [P-1:0][NUM_VC-1:0][VC_W-1:0]   outvc;
  logic [P-1:0]                         alloc_valid;
  logic [P-1:0][VC_W-1:0]               alloc_vc;
  int checks = 0, failures = 0;

  vc_allocator #(.NUM_PORTS(P)) dut (.*);

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

  // grants this cycle are legal; update the busy model and drop served requests
  task automatic step();
    #1;
    for (int o = 0; o < P; o++) begin
      int n = 0;
      for (int i = 0; i < P; i++)
        for (int v = 0; v < NUM_VC; v++)
          if (grant[i][v]) begin
            chk("grant only on request", req[i][v]);
            if (port[i][v] == PORT_W'(o)) begin
              n++;
              chk("granted VC was free", !vc_busy[o][outvc[i][v]]);
              chk("alloc matches", alloc_valid[o] && alloc_vc[o] == outvc[i][v]);
            end
          end
      chk("one grant per output", n <= 1);
    end
    @(posedge clk);
    for (int i = 0; i < P; i++)
      for (int v = 0; v < NUM_VC; v++)
        if (grant[i][v]) begin
          vc_busy[port[i][v]][outvc[i][v]] <= 1'b1;
          req[i][v] <= 1'b0;
        end
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // lone request
    req[0][1] = 1; port[0][1] = 6'd2;
    #1 chk("lone grant", grant[0][1] && outvc[0][1] == 0);
    step();
    // three inputs want output 3: two VCs, one per cycle, then the third waits
    req[1][0] = 1; port[1][0] = 6'd3;
    req[2][0] = 1; port[2][0] = 6'd3;
    req[3][1] = 1; port[3][1] = 6'd3;
    step(); step();
    chk("both VCs of port 3 taken", vc_busy[3] == 2'b11);
    step(); step();
    chk("third still waits", (req[1][0] + req[2][0] + req[3][1]) == 1);
    vc_busy[3][0] = 1'b0;
    step();
    chk("third served after free", (req[1][0] + req[2][0] + req[3][1]) == 0);
    // random
    vc_busy = '0; req = '0;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < P; i++)
        for (int v = 0; v < NUM_VC; v++)
          if (!req[i][v] && $urandom_range(0, 3) == 0) begin
            req[i][v] = 1; port[i][v] = PORT_W'($urandom_range(0, P - 1));
          end
      for (int o = 0; o < P; o++)
        for (int v = 0; v < NUM_VC; v++)
          if (vc_busy[o][v] && $urandom_range(0, 2) == 0) vc_busy[o][v] = 1'b0;
      step();
    end
    req = '0; step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
