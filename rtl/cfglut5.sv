// cfglut5: run-time reconfigurable 5-input look-up table.
//
// The truth table lives in a 32-bit INIT shift register. While ce is high,
// each rising clock shifts cdi into bit 0 and moves every bit one place up;
// the bit leaving position 31 appears on cdo, so CFGLUTs can be chained.
// Shifting INIT[31] first and INIT[0] last loads a full word in 32 clocks.
//   o6 = INIT[{i4,i3,i2,i1,i0}]   (one 5-input function)
//   o5 = INIT[{1'b0,i3,i2,i1,i0}] (a 4-input function of the lower half)
// Outputs are combinational in i0..i4 and change on the clock edge that
// shifts the table. The register starts at the INIT parameter; an obfuscated
// design leaves it 0 so the programmed function never appears in the FPGA
// bitstream. The port set (I0..I4, CE, CDI, Clk, O5, O6, CDO) and the 32-bit
// shift register follow the described CFGLUT5; there is no reset, as in the
// primitive it models. Verilator notes that the register has both a
// declaration initial value and a clocked write; that is intended: the
// initial value is the configuration-time contents.
module cfglut5 #(
  parameter logic [31:0] INIT = 32'h0000_0000
) (
  input  logic clk,
  input  logic ce,
  input  logic cdi,
  input  logic i0,
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  output logic o5,
  output logic o6,
  output logic cdo
);

  // Power-up value from INIT (an FPGA register initial value).
  logic [31:0] init_q = INIT;

  always_ff @(posedge clk) begin
    if (ce) init_q <= {init_q[30:0], cdi};
  end

  assign o6  = init_q[{i4, i3, i2, i1, i0}];
  assign o5  = init_q[{1'b0, i3, i2, i1, i0}];
  assign cdo = init_q[31];

endmodule
