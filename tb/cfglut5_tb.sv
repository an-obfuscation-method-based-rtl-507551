// cfglut5_tb: self-checking test of the run-time configurable LUT.
// Loads random truth tables through CDI (MSB first, 32 clocks with CE high),
// then compares O6 and O5 for every input combination with the table, checks
// that CE low freezes the table, that CDO shifts the old table out in order,
// and that an instance starts with its INIT parameter.
module cfglut5_tb;
  logic clk = 1'b0;
  logic ce, cdi;
  logic [4:0] sel;
  logic o5, o6, cdo;
  logic o5_p, o6_p, cdo_p;
  int checks = 0, failures = 0;

  localparam logic [31:0] PRESET = 32'hA5C3_0F96;

  always #5 clk = ~clk;

  cfglut5 dut (.clk, .ce, .cdi, .i0(sel[0]), .i1(sel[1]), .i2(sel[2]), .i3(sel[3]), .i4(sel[4]),
               .o5, .o6, .cdo);
  cfglut5 #(.INIT(PRESET)) dut_p (.clk, .ce(1'b0), .cdi(1'b0), .i0(sel[0]), .i1(sel[1]),
               .i2(sel[2]), .i3(sel[3]), .i4(sel[4]), .o5(o5_p), .o6(o6_p), .cdo(cdo_p));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // Shift a word in, MSB first; while shifting, CDO must give old word MSB first.
  task automatic load(input logic [31:0] w, input logic [31:0] old, input bit check_cdo);
    for (int b = 31; b >= 0; b--) begin
      if (check_cdo) check(cdo, old[b], "cdo");
      @(negedge clk);
      ce = 1'b1; cdi = w[b];
      @(posedge clk);
      #1 ce = 1'b0;
    end
  endtask

  task automatic check_table(input logic [31:0] w);
    for (int s = 0; s < 32; s++) begin
      sel = 5'(s);
      #1;
      check(o6, w[s], "o6");
      if (s < 16) check(o5, w[s], "o5");
      // o5 ignores i4
      if (s >= 16) check(o5, w[s-16], "o5 ignores i4");
    end
  endtask

  initial begin
    logic [31:0] w, prev;
    ce = 0; cdi = 0; sel = 0;
    // preset instance starts with its INIT
    for (int s = 0; s < 32; s++) begin
      sel = 5'(s); #1;
      check(o6_p, PRESET[s], "preset o6");
    end
    check(cdo_p, PRESET[31], "preset cdo");
    prev = '0;
    load(32'h0000_0000, '0, 0);
    for (int t = 0; t < 8; t++) begin
      w = $urandom();
      if (t == 0) w = 32'h8000_0001;
      load(w, prev, 1);
      check_table(w);
      // CE low: table held over several clocks with CDI toggling
      repeat (5) begin @(negedge clk); cdi = ~cdi; end
      check_table(w);
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
