// key_gate_tb: self-checking test of a CFGLUT key gate.
// Before programming the gate output must be 0. Then, for every gate
// function, the test shifts the function's INIT in (32 clocks) and compares
// net_out with the function computed here from the SystemVerilog operators
// for all four (net, key) pairs. It also checks the locking property: for
// XOR/OR the correct key is 0, for XNOR/AND it is 1, and with the correct
// key the net passes unchanged while the wrong key corrupts it.
module key_gate_tb;
  import cfglut_pkg::*;
  logic clk = 1'b0;
  logic net_in, key, cfg_ce, cfg_cdi, net_out, cfg_cdo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  key_gate dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic ref_gate(gate_kind_e k, logic a, logic b);
    case (k)
      GATE_AND:  return a & b;
      GATE_OR:   return a | b;
      GATE_NAND: return ~(a & b);
      GATE_NOR:  return ~(a | b);
      GATE_XOR:  return a ^ b;
      GATE_XNOR: return ~(a ^ b);
      GATE_NOT:  return ~a;
      default:   return 1'b0;
    endcase
  endfunction

  task automatic load_init(input logic [31:0] w);
    for (int b = 31; b >= 0; b--) begin
      cfg_ce = 1; cfg_cdi = w[b];
      @(negedge clk);
    end
    cfg_ce = 0;
  endtask

  initial begin
    gate_kind_e k;
    cfg_ce = 0; cfg_cdi = 0; net_in = 0; key = 0;
    @(negedge clk);
    for (int v = 0; v < 4; v++) begin
      {key, net_in} = 2'(v); #1;
      check(net_out == 1'b0, "unprogrammed output is 0");
    end
    k = k.first();
    for (int n = 0; n < 7; n++) begin
      load_init(key_gate_init(k));
      for (int v = 0; v < 4; v++) begin
        {key, net_in} = 2'(v); #1;
        check(net_out == ref_gate(k, net_in, key), $sformatf("%s net=%0b key=%0b", k.name(), net_in, key));
      end
      if (k inside {GATE_XOR, GATE_OR, GATE_XNOR, GATE_AND}) begin
        logic good;
        good = (k inside {GATE_XNOR, GATE_AND});
        for (int v = 0; v < 2; v++) begin
          net_in = 1'(v);
          key = good; #1;
          check(net_out == net_in, $sformatf("%s correct key passes net", k.name()));
        end
        key = ~good; net_in = good; #1;
        check(net_out != net_in, $sformatf("%s wrong key corrupts net", k.name()));
      end
      @(negedge clk);
      k = k.next();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
