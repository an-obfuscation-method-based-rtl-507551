// cfglut_obf_top: an FPGA design obfuscated with run-time programmed CFGLUTs.
//
// Parts of the design are implemented in CFGLUTs whose truth tables are not
// in the FPGA bitstream but in a separate secure memory. After power-up the
// loader copies them from that memory into all CFGLUTs in parallel, in 32
// clock cycles; until then the obfuscated logic computes constant 0.
// Two uses are shown side by side:
//   * substitution: CFGLUT 0 replaces the LUT of a memory-controller
//     statement, init_ack_fe = init_ack_r & !init_ack (mc_init_ack_fe_obf);
//   * logic encryption: CFGLUTs 1..N_KEY_GATES are key gates inserted on nets
//     of a circuit (key_gate). The circuit itself is outside this module:
//     its locked nets enter on lock_net_in, the key bits on key_in, and the
//     gate outputs leave on lock_net_out.
// Interface: sm_wr_* provisions the secure memory (row r, bit i = INIT bit
// 31-r of CFGLUT i); cfg_start begins programming, cfg_busy is high for the
// 32 shift cycles and cfg_done stays high afterwards. Reset is synchronous,
// active low. The structure follows the design description; the memory
// layout, handshake and port set are this design's choices.
module cfglut_obf_top #(
  parameter int unsigned N_KEY_GATES = 2,
  parameter int unsigned INIT_BITS   = cfglut_pkg::INIT_BITS,
  localparam int unsigned N_LUTS = N_KEY_GATES + 1,
  localparam int unsigned AW     = $clog2(INIT_BITS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // secure-memory provisioning
  input  logic                   sm_wr_en,
  input  logic [AW-1:0]          sm_wr_addr,
  input  logic [N_LUTS-1:0]      sm_wr_data,
  // run-time programming
  input  logic                   cfg_start,
  output logic                   cfg_busy,
  output logic                   cfg_done,
  output logic [N_LUTS-1:0]      cfg_cdo,
  // memory-controller fragment
  input  logic                   init_ack,
  output logic                   init_ack_fe,
  // locked circuit
  input  logic [N_KEY_GATES-1:0] lock_net_in,
  input  logic [N_KEY_GATES-1:0] key_in,
  output logic [N_KEY_GATES-1:0] lock_net_out
);

  logic              rd_en;
  logic [AW-1:0]     rd_addr;
  logic [N_LUTS-1:0] rd_data;
  logic              cfg_ce;
  logic [N_LUTS-1:0] cfg_cdi;

  secure_memory #(.WIDTH(N_LUTS), .DEPTH(INIT_BITS)) u_secure_memory (
    .clk     (clk),
    .wr_en   (sm_wr_en),
    .wr_addr (sm_wr_addr),
    .wr_data (sm_wr_data),
    .rd_en   (rd_en),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

  cfglut_loader #(.N_LUTS(N_LUTS), .INIT_BITS(INIT_BITS)) u_loader (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (cfg_start),
    .mem_rd_en   (rd_en),
    .mem_rd_addr (rd_addr),
    .mem_rd_data (rd_data),
    .cfg_ce      (cfg_ce),
    .cfg_cdi     (cfg_cdi),
    .busy        (cfg_busy),
    .done        (cfg_done)
  );

  mc_init_ack_fe_obf u_mc_init_ack_fe (
    .clk         (clk),
    .rst         (!rst_n),
    .init_ack    (init_ack),
    .cfg_ce      (cfg_ce),
    .cfg_cdi     (cfg_cdi[0]),
    .init_ack_fe (init_ack_fe),
    .cfg_cdo     (cfg_cdo[0])
  );

  for (genvar g = 0; g < N_KEY_GATES; g++) begin : g_key
    key_gate u_key_gate (
      .clk     (clk),
      .net_in  (lock_net_in[g]),
      .key     (key_in[g]),
      .cfg_ce  (cfg_ce),
      .cfg_cdi (cfg_cdi[g+1]),
      .net_out (lock_net_out[g]),
      .cfg_cdo (cfg_cdo[g+1])
    );
  end

endmodule
