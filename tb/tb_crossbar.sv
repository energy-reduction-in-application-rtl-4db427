// tb_crossbar: random test of the 5x5 crossbar.
//
// Applies random input flits, random selections (a permutation, as the switch
// allocator produces) and random outgoing virtual channels, and checks every
// output flit and valid against a direct computation.
module tb_crossbar;
  import noc_pkg::*;

  flit_t              in_flit  [NUM_PORTS];
  logic [PORT_W-1:0]  sel      [NUM_PORTS];
  logic               en       [NUM_PORTS];
  logic [VC_ID_W-1:0] out_vc   [NUM_PORTS];
  flit_t              out_flit [NUM_PORTS];
  logic               out_valid[NUM_PORTS];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [NUM_PORTS];
      for (int i = 0; i < NUM_PORTS; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_flit[i].ftype = flit_type_e'($urandom_range(0, 3));
        in_flit[i].vc    = VC_ID_W'($urandom);
        in_flit[i].data  = $urandom;
        sel[i]    = PORT_W'(perm[i]);
        en[i]     = 1'($urandom);
        out_vc[i] = VC_ID_W'($urandom);
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        flit_t exp;
        exp    = in_flit[perm[o]];
        exp.vc = out_vc[o];
        checks++;
        if (out_flit[o] !== exp || out_valid[o] !== en[o]) begin
          failures++;
          $display("FAIL output %0d: got %h expected %h", o, out_flit[o], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
