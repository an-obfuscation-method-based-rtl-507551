// mc_init_ack_fe_obf_tb: self-checking test of the memory-controller fragment
// whose init_ack_fe statement is done by a CFGLUT.
// Before programming, init_ack_fe must stay 0 whatever init_ack does. The
// test then shifts INIT 32'h0000_0001 in (32 clocks) and compares
// init_ack_fe with init_ack_r & !init_ack, modelled in the testbench, over
// a random init_ack sequence, counting the falling edges seen.
module mc_init_ack_fe_obf_tb;
  logic clk = 1'b0;
  logic rst, init_ack, cfg_ce, cfg_cdi;
  logic init_ack_fe, cfg_cdo;
  logic ref_r;
  int checks = 0, failures = 0, edges = 0, ones_unprogrammed = 0;

  localparam logic [31:0] FE_INIT = 32'h0000_0001;

  always #5 clk = ~clk;

  mc_init_ack_fe_obf dut (.*);

  always_ff @(posedge clk) ref_r <= rst ? 1'b0 : init_ack;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst = 1; init_ack = 0; cfg_ce = 0; cfg_cdi = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // unprogrammed: function absent
    for (int n = 0; n < 40; n++) begin
      init_ack = 1'($urandom());
      #1;
      if (ref_r & ~init_ack) ones_unprogrammed++;
      check(init_ack_fe == 1'b0, "unprogrammed output is 0");
      @(negedge clk);
    end
    check(ones_unprogrammed > 0, "an edge occurred while unprogrammed");
    // program, MSB first
    for (int b = 31; b >= 0; b--) begin
      cfg_ce = 1; cfg_cdi = FE_INIT[b];
      @(negedge clk);
    end
    cfg_ce = 0;
    for (int n = 0; n < 200; n++) begin
      init_ack = 1'($urandom());
      #1;
      check(init_ack_fe == (ref_r & ~init_ack), $sformatf("init_ack_fe at step %0d", n));
      if (ref_r & ~init_ack) edges++;
      @(negedge clk);
    end
    check(edges > 0, "falling edges exercised");
    // synchronous reset clears init_ack_r
    init_ack = 1; @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    init_ack = 0; #1;
    check(init_ack_fe == 1'b0, "no edge right after reset");
    $display("edges seen: %0d", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
