// tb_vc_buffer: self-checking test of the virtual-channel flit buffer.
//
// Drives random pushes and pops (never a push into a full buffer or a pop from
// an empty one, as credit flow control guarantees in the network) and compares
// front_flit, empty and full with a queue model every cycle. Also checks that
// exactly DEPTH flits fit and that the front flit is readable in the cycle
// after it was written.
module tb_vc_buffer;
  import noc_pkg::*;

  localparam int DEPTH = 4;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  push = 1'b0, pop = 1'b0;
  flit_t in_flit = '0;
  flit_t front_flit;
  logic  empty, full;

  int checks = 0, failures = 0;
  flit_t model [$];

  vc_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic flit_t rand_flit();
    flit_t f;
    f.ftype = flit_type_e'($urandom_range(0, 3));
    f.vc    = VC_ID_W'($urandom);
    f.data  = $urandom;
    return f;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full, "empty after reset");

    // fill to the brim, then check full and order
    for (int i = 0; i < DEPTH; i++) begin
      in_flit = rand_flit();
      push = 1'b1;
      model.push_back(in_flit);
      @(negedge clk);
      push = 1'b0;
      check(!empty, "not empty after a write");
      check(front_flit == model[0], "front flit after a write");
    end
    check(full, "full after DEPTH writes");
    for (int i = 0; i < DEPTH; i++) begin
      check(front_flit == model[0], "drain order");
      pop = 1'b1;
      void'(model.pop_front());
      @(negedge clk);
      pop = 1'b0;
    end
    check(empty, "empty after draining");

    // random traffic
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic do_push, do_pop;
      do_pop  = (model.size() > 0) && ($urandom_range(0, 99) < 50);
      do_push = ((model.size() < DEPTH) || do_pop) && ($urandom_range(0, 99) < 55);
      push    = do_push;
      pop     = do_pop;
      in_flit = rand_flit();
      if (do_pop)  void'(model.pop_front());
      if (do_push) model.push_back(in_flit);
      @(negedge clk);
      push = 1'b0;
      pop  = 1'b0;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(front_flit == model[0], "front flit");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
