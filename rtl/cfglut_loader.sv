// cfglut_loader: programs every CFGLUT of the design at run time.
//
// After start, the loader reads the bit-sliced secure memory row by row and
// drives row r onto the CDI inputs of all CFGLUTs at once (bit i to CFGLUT i)
// while holding the shared CE high. All CFGLUTs are thus loaded in parallel,
// INIT[31] first, and CE is high for exactly INIT_BITS (32) clock cycles,
// the programming time overhead of the method.
// Timing: the cycle start is seen in IDLE issues the read of row 0; the next
// INIT_BITS cycles are SHIFT cycles (CE high, row k on CDI, row k+1 being
// read); then done rises and stays high. busy is high during SHIFT. A new
// start in DONE reprograms all CFGLUTs. Reset is synchronous, active low.
// The 32-cycle parallel programming follows the design description; the
// state machine, the start/done handshake and the memory layout are this
// design's own.
module cfglut_loader #(
  parameter int unsigned N_LUTS    = 3,
  parameter int unsigned INIT_BITS = 32,
  localparam int unsigned AW = $clog2(INIT_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              mem_rd_en,
  output logic [AW-1:0]     mem_rd_addr,
  input  logic [N_LUTS-1:0] mem_rd_data,
  output logic              cfg_ce,
  output logic [N_LUTS-1:0] cfg_cdi,
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_DONE} state_e;

  localparam logic [AW-1:0] LAST = AW'(INIT_BITS - 1);

  state_e        state_q, state_d;
  logic [AW-1:0] cnt_q, cnt_d;

  always_comb begin
    state_d     = state_q;
    cnt_d       = cnt_q;
    mem_rd_en   = 1'b0;
    mem_rd_addr = '0;
    cfg_ce      = 1'b0;
    cfg_cdi     = '0;
    unique case (state_q)
      S_IDLE, S_DONE: begin
        if (start) begin
          mem_rd_en   = 1'b1;
          mem_rd_addr = '0;
          cnt_d       = '0;
          state_d     = S_SHIFT;
        end
      end
      S_SHIFT: begin
        cfg_ce  = 1'b1;
        cfg_cdi = mem_rd_data;
        if (cnt_q == LAST) begin
          state_d = S_DONE;
        end else begin
          mem_rd_en   = 1'b1;
          mem_rd_addr = cnt_q + 1'b1;
          cnt_d       = cnt_q + 1'b1;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
    end
  end

  assign busy = (state_q == S_SHIFT);
  assign done = (state_q == S_DONE);

  // CE is only ever raised while shifting, and a load that started always
  // shifts for exactly INIT_BITS cycles before done.
  a_ce_only_shifting: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_ce |-> busy);
  a_load_length: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != S_SHIFT) ##1 (state_q == S_SHIFT) |-> (state_q == S_SHIFT) [*INIT_BITS] ##1 done);

endmodule
