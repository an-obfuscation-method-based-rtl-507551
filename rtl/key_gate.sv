// key_gate: a CFGLUT inserted on a net as a logic-encryption key gate.
//
// The gate sits between a net of a circuit and the logic that the net fed.
// Its function f(net, key) is one of AND, OR, NAND, NOR, XOR, XNOR or NOT,
// chosen together with the correct key value so that the circuit works only
// with the right key (for example XOR with key 0, XNOR with key 1, AND with
// key 1, OR with key 0). The function is not in the FPGA bitstream: the
// CFGLUT starts with INIT 0 and receives its INIT (cfglut_pkg::key_gate_init)
// through cfg_ce/cfg_cdi at run time. I0 is the net, I1 the key, I2..I4 are
// tied low and the output is O5, combinational in net_in and key.
// Using a CFGLUT as a key gate follows the design description; the pin
// assignment is this design's choice.
module key_gate (
  input  logic clk,
  input  logic net_in,
  input  logic key,
  input  logic cfg_ce,
  input  logic cfg_cdi,
  output logic net_out,
  output logic cfg_cdo
);

  logic o6_unused;

  cfglut5 #(.INIT(32'h0000_0000)) u_lut (
    .clk (clk),
    .ce  (cfg_ce),
    .cdi (cfg_cdi),
    .i0  (net_in),
    .i1  (key),
    .i2  (1'b0),
    .i3  (1'b0),
    .i4  (1'b0),
    .o5  (net_out),
    .o6  (o6_unused),
    .cdo (cfg_cdo)
  );

endmodule
