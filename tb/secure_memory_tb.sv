// secure_memory_tb: self-checking test of the bit-sliced secure memory.
// Writes every row with random data, reads it back with one clock of read
// latency, checks that a read without rd_en keeps the output, and that a
// row can be rewritten.
module secure_memory_tb;
  localparam int unsigned WIDTH = 3;
  localparam int unsigned DEPTH = 32;
  logic clk = 1'b0;
  logic wr_en, rd_en;
  logic [4:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  secure_memory #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic [WIDTH-1:0] got, input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic write_row(input int a, input logic [WIDTH-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = 5'(a); wr_data = d;
    @(posedge clk);
    #1 wr_en = 0;
    model[a] = d;
  endtask

  task automatic read_row(input int a);
    @(negedge clk);
    rd_en = 1; rd_addr = 5'(a);
    @(posedge clk);
    #1 rd_en = 0;
    check(rd_data, model[a], $sformatf("row %0d", a));
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    for (int a = 0; a < DEPTH; a++) write_row(a, WIDTH'($urandom()));
    for (int a = 0; a < DEPTH; a++) read_row(a);
    // rd_en low: output holds the last row read
    @(negedge clk); rd_addr = 5'd3;
    repeat (3) @(posedge clk);
    #1 check(rd_data, model[DEPTH-1], "hold without rd_en");
    // rewrite rows and read them back in a random order
    for (int a = 0; a < DEPTH; a += 3) write_row(a, ~model[a]);
    for (int n = 0; n < 64; n++) read_row(int'($urandom_range(DEPTH-1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
