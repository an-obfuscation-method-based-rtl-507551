// cfglut_obf_top_tb: end-to-end test of the obfuscated design at its default
// size (one substituted CFGLUT and two key gates).
// Sequence: reset; check that with unprogrammed CFGLUTs every obfuscated
// output is 0; provision the secure memory with the bit-sliced INIT words;
// start programming and check that it takes exactly 32 CE cycles; then check
// init_ack_fe against init_ack_r & !init_ack, and the key gates with correct
// and wrong keys; finally reprogram the key gates with other functions and
// read the previous INIT words back on CDO while shifting. Each mechanism is
// counted and a mechanism that never happened counts as a failure.
module cfglut_obf_top_tb;
  import cfglut_pkg::*;
  localparam int unsigned NK = 2;
  localparam int unsigned NL = NK + 1;

  logic clk = 1'b0;
  logic rst_n;
  logic sm_wr_en;
  logic [4:0] sm_wr_addr;
  logic [NL-1:0] sm_wr_data;
  logic cfg_start, cfg_busy, cfg_done;
  logic [NL-1:0] cfg_cdo;
  logic init_ack, init_ack_fe;
  logic [NK-1:0] lock_net_in, key_in, lock_net_out;

  int checks = 0, failures = 0;
  int n_unprog = 0, n_prog = 0, n_fe = 0, n_key_ok = 0, n_key_bad = 0, n_reprog = 0, n_readback = 0;
  logic ack_r;
  logic [31:0] inits [NL];

  always #5 clk = ~clk;

  cfglut_obf_top dut (.*);

  always_ff @(posedge clk) ack_r <= !rst_n ? 1'b0 : init_ack;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic provision();
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      sm_wr_en = 1; sm_wr_addr = 5'(r);
      for (int i = 0; i < NL; i++) sm_wr_data[i] = inits[i][31-r];
    end
    @(negedge clk);
    sm_wr_en = 0;
  endtask

  // Start programming; count CE cycles and check CDO shows the old words.
  task automatic program_all(input logic [31:0] old [NL], input bit check_old);
    int ce_cycles, t;
    @(negedge clk); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    ce_cycles = 0; t = 0;
    while (!cfg_done && t < 100) begin
      if (cfg_busy) begin
        if (check_old) begin
          for (int i = 0; i < NL; i++)
            check(cfg_cdo[i] == old[i][31-ce_cycles], $sformatf("readback lut %0d bit %0d", i, 31-ce_cycles));
          n_readback++;
        end
        ce_cycles++;
      end
      @(negedge clk); t++;
    end
    check(ce_cycles == 32, $sformatf("programming took %0d CE cycles, expected 32", ce_cycles));
    check(cfg_done, "done after programming");
    n_prog++;
  endtask

  task automatic check_fe(input int steps, input bit programmed);
    for (int n = 0; n < steps; n++) begin
      init_ack = 1'($urandom());
      #1;
      if (programmed) begin
        check(init_ack_fe == (ack_r & ~init_ack), "init_ack_fe");
        if (ack_r & ~init_ack) n_fe++;
      end else begin
        check(init_ack_fe == 1'b0, "unprogrammed init_ack_fe is 0");
        if (ack_r & ~init_ack) n_unprog++;
      end
      @(negedge clk);
    end
  endtask

  // good[g] is the correct key bit of key gate g.
  task automatic check_keys(input logic [NK-1:0] good);
    for (int n = 0; n < 16; n++) begin
      lock_net_in = NK'($urandom());
      key_in = good; #1;
      check(lock_net_out == lock_net_in, "correct key passes the nets");
      n_key_ok++;
      for (int g = 0; g < NK; g++) begin
        key_in = good; key_in[g] = ~good[g]; lock_net_in[g] = good[g]; #1;
        check(lock_net_out[g] != lock_net_in[g], $sformatf("wrong key bit %0d corrupts its net", g));
        n_key_bad++;
      end
    end
  endtask

  initial begin
    logic [31:0] old [NL];
    rst_n = 0; sm_wr_en = 0; sm_wr_addr = 0; sm_wr_data = 0; cfg_start = 0;
    init_ack = 0; lock_net_in = 0; key_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // before programming the obfuscated logic is absent
    check_fe(40, 0);
    for (int v = 0; v < 16; v++) begin
      {key_in, lock_net_in} = 4'(v); #1;
      check(lock_net_out == '0, "unprogrammed key gates give 0");
    end
    check(!cfg_done && !cfg_busy, "idle before start");
    // provision and program: gate 1 XOR (key 0), gate 2 XNOR (key 1)
    inits[0] = INIT_ACK_FE_INIT;
    inits[1] = key_gate_init(GATE_XOR);
    inits[2] = key_gate_init(GATE_XNOR);
    provision();
    old = '{default: '0};
    program_all(old, 1);
    check_fe(200, 1);
    check_keys(2'b10);
    // reprogram the key gates: gate 1 AND (key 1), gate 2 OR (key 0)
    old = inits;
    inits[1] = key_gate_init(GATE_AND);
    inits[2] = key_gate_init(GATE_OR);
    provision();
    program_all(old, 1);
    n_reprog++;
    check_fe(100, 1);
    check_keys(2'b01);

    $display("mechanisms: unprogrammed-edges=%0d programmings=%0d reprogrammings=%0d readback-cycles=%0d fe-edges=%0d correct-key=%0d wrong-key=%0d",
             n_unprog, n_prog, n_reprog, n_readback, n_fe, n_key_ok, n_key_bad);
    check(n_unprog > 0, "edge while unprogrammed happened");
    check(n_prog > 0, "programming happened");
    check(n_reprog > 0, "reprogramming happened");
    check(n_readback > 0, "CDO readback happened");
    check(n_fe > 0, "init_ack falling edge happened");
    check(n_key_ok > 0, "correct key applied");
    check(n_key_bad > 0, "wrong key applied");
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
