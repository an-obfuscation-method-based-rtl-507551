// cfglut_loader_tb: self-checking test of the CFGLUT programming controller.
// A memory model in the testbench answers reads one clock later. The test
// checks that, after start, CE is high for exactly 32 consecutive cycles,
// that CDI carries rows 0..31 in order, that done rises the cycle after the
// last shift and stays high, that a second start reprograms, and that reset
// aborts a load.
module cfglut_loader_tb;
  localparam int unsigned N = 3;
  localparam int unsigned BITS = 32;
  logic clk = 1'b0;
  logic rst_n, start;
  logic mem_rd_en;
  logic [4:0] mem_rd_addr;
  logic [N-1:0] mem_rd_data;
  logic cfg_ce;
  logic [N-1:0] cfg_cdi;
  logic busy, done;
  logic [N-1:0] rows [BITS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfglut_loader #(.N_LUTS(N), .INIT_BITS(BITS)) dut (.*);

  // one-cycle read latency memory model
  always_ff @(posedge clk) if (mem_rd_en) mem_rd_data <= rows[mem_rd_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Pulse start and follow one full load, cycle by cycle.
  task automatic run_load();
    int ce_cycles, t;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    ce_cycles = 0;
    t = 0;
    while (!done && t < 100) begin
      if (cfg_ce) begin
        check(cfg_cdi == rows[ce_cycles], $sformatf("cdi row %0d", ce_cycles));
        check(busy, "busy during shift");
        ce_cycles++;
      end
      @(negedge clk);
      t++;
    end
    check(ce_cycles == BITS, $sformatf("CE high %0d cycles, expected %0d", ce_cycles, BITS));
    check(t == BITS, $sformatf("done after %0d cycles, expected %0d", t, BITS));
    repeat (4) begin
      @(negedge clk);
      check(done && !cfg_ce && !busy, "done holds, CE low");
    end
  endtask

  initial begin
    rst_n = 0; start = 0;
    for (int r = 0; r < BITS; r++) rows[r] = N'($urandom());
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!done && !busy && !cfg_ce, "idle after reset");
    run_load();
    for (int r = 0; r < BITS; r++) rows[r] = N'($urandom());
    run_load();
    // reset during a load returns to idle
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    check(cfg_ce && busy, "shifting before reset");
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    check(!done && !busy && !cfg_ce, "idle after reset mid-load");
    run_load();
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
