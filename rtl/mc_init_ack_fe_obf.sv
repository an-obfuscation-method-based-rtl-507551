// mc_init_ack_fe_obf: a fragment of a memory controller with one statement
// moved into a CFGLUT.
//
// The original statement is  init_ack_fe = init_ack_r & !init_ack,  the
// falling edge of init_ack, where init_ack_r is init_ack delayed by one
// clock. Here init_ack_r is still a flip-flop (clock enable always on,
// synchronous reset rst), its inverse !init_ack_r is formed in ordinary
// logic, and the AND is done by a CFGLUT5 with I0 = init_ack,
// I1 = !init_ack_r, I2..I4 = 0 and output O5. The CFGLUT's INIT is 0 in the
// FPGA bitstream, so until it is programmed through cfg_ce/cfg_cdi (32
// clocks, INIT_ACK_FE_INIT = 32'h0000_0001) init_ack_fe stays 0 and the
// statement cannot be read back from the bitstream.
// Timing: init_ack_fe is combinational in init_ack and init_ack_r.
// Pin mapping, INIT 0 and the inverter follow the described substitution;
// the reset of init_ack_r is this design's choice.
module mc_init_ack_fe_obf (
  input  logic clk,
  input  logic rst,
  input  logic init_ack,
  input  logic cfg_ce,
  input  logic cfg_cdi,
  output logic init_ack_fe,
  output logic cfg_cdo
);

  logic init_ack_r;
  logic init_ack_r_n;
  logic o6_unused;

  always_ff @(posedge clk) begin
    if (rst) init_ack_r <= 1'b0;
    else     init_ack_r <= init_ack;
  end

  assign init_ack_r_n = ~init_ack_r;

  cfglut5 #(.INIT(32'h0000_0000)) inst0 (
    .clk (clk),
    .ce  (cfg_ce),
    .cdi (cfg_cdi),
    .i0  (init_ack),
    .i1  (init_ack_r_n),
    .i2  (1'b0),
    .i3  (1'b0),
    .i4  (1'b0),
    .o5  (init_ack_fe),
    .o6  (o6_unused),
    .cdo (cfg_cdo)
  );

endmodule
