// tb_crossbar: random permutations and partial selections on an 8-port
// crossbar; every output must carry exactly the flit of its selected input.
module tb_crossbar;
  import pfc_pkg::*;
  localparam int P = 8;

  logic  [P-1:0]          in_valid, sel_valid, out_valid;
  flit_t [P-1:0]          in_flit, out_flit;
  logic  [P-1:0][2:0]     sel;
  int checks = 0, failures = 0;

  crossbar #(.NUM_PORTS(P)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int perm [P];
      for (int i = 0; i < P; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < P; i++) begin
        in_valid[i]  = 1'b1;
        in_flit[i]   = '{kind: flit_kind_e'($urandom_range(0, 3)), vc: VC_W'($urandom), data: {$urandom, $urandom}};
        sel[i]       = 3'(perm[i]);
        sel_valid[i] = ($urandom_range(0, 3) != 0);
      end
      #1;
      for (int o = 0; o < P; o++) begin
        checks++;
        if (out_valid[o] !== sel_valid[o] || (sel_valid[o] && out_flit[o] !== in_flit[perm[o]])) begin
          failures++;
          $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
