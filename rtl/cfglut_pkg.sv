// cfglut_pkg: constants and types shared by the CFGLUT obfuscation design.
//
// A CFGLUT5 holds a 32-bit INIT word, the truth table of a 5-input LUT, that
// is shifted in one bit per clock at run time. This package fixes that size,
// names the gate functions a key-gate CFGLUT may be programmed to, and gives
// the INIT words used by the design:
//   * key gates take the locked net on I0 and the key bit on I1; the 4-entry
//     table indexed by {I1,I0} is repeated over the 32 entries so that the
//     unused inputs I2..I4 do not matter.
//   * the mem-ctrl substitution computes init_ack_fe = init_ack_r & !init_ack
//     with I0 = init_ack and I1 = !init_ack_r (I2..I4 tied low), so only
//     entry 0 ({I1,I0} = 00) is 1: INIT = 32'h0000_0001.
// The gate list and the 32-bit size follow the design description; the
// table layout of a key gate (which input is the key) is this design's choice.
package cfglut_pkg;

  localparam int unsigned INIT_BITS = 32;   // 2**5 entries of a 5-input LUT

  typedef logic [INIT_BITS-1:0] cfglut_init_t;

  // Gate functions a key-gate CFGLUT can implement.
  typedef enum logic [2:0] {
    GATE_AND  = 3'd0,
    GATE_OR   = 3'd1,
    GATE_NAND = 3'd2,
    GATE_NOR  = 3'd3,
    GATE_XOR  = 3'd4,
    GATE_XNOR = 3'd5,
    GATE_NOT  = 3'd6
  } gate_kind_e;

  // 4-entry table, bit index {key, net}.
  function automatic logic [3:0] gate_table(gate_kind_e kind);
    case (kind)
      GATE_AND:  return 4'b1000;
      GATE_OR:   return 4'b1110;
      GATE_NAND: return 4'b0111;
      GATE_NOR:  return 4'b0001;
      GATE_XOR:  return 4'b0110;
      GATE_XNOR: return 4'b1001;
      GATE_NOT:  return 4'b0101;   // !net, key ignored
      default:   return 4'b0000;
    endcase
  endfunction

  // Full 32-bit INIT of a key gate: the table repeated over I2..I4.
  function automatic cfglut_init_t key_gate_init(gate_kind_e kind);
    return {8{gate_table(kind)}};
  endfunction

  // INIT of the CFGLUT that replaces init_ack_fe = init_ack_r & !init_ack.
  localparam cfglut_init_t INIT_ACK_FE_INIT = 32'h0000_0001;

endpackage
