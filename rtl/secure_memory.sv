// secure_memory: the separate memory that holds the CFGLUT bitstream.
//
// The configuration of the CFGLUTs is kept out of the FPGA bitstream and
// stored here instead. The memory is organised bit-sliced so that every
// CFGLUT can be programmed in parallel: row r holds INIT bit (DEPTH-1-r) of
// every CFGLUT, bit i of a row belonging to CFGLUT i. Reading rows 0..DEPTH-1
// in order therefore gives, each cycle, the next CDI bit for all CFGLUTs.
// Write port: provisioning over the trusted channel, one row per clock.
// Read port: synchronous, rd_data holds the row addressed in the previous
// cycle while rd_en was high (block-RAM style) and keeps it otherwise.
// Only the role of the memory is given by the design description; the
// bit-sliced layout and the port set are this design's choice. Any error
// detection or correction of the physical memory is outside this model.
module secure_memory #(
  parameter int unsigned WIDTH = 3,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
