// tb_ble: checks the nonfracturable BLE, one LUT instance and one MUX4
// instance side by side. Each cycle it draws random inputs, truth table,
// inversion bits, bypass bit and clock enable, and checks both outputs
// against a model: bypassed, the output is the LE value now; registered,
// the value the LE had at the last rising edge with ce = 1 (0 after reset).
// Registered outputs are checked both before and after the clock edge so
// the one-cycle latency is verified. Reset is pulsed again mid-run.
module tb_ble;
  import fpga_pkg::*;
  logic clk = 0, rst_n = 0, ce;
  logic [5:0]  in;
  logic [63:0] cfg;
  logic        reg_l, reg_m;
  logic        out_l, out_m;
  logic        q_l, q_m;      // model registers
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ble #(.IS_MUX4(1'b0)) dut_lut (.clk, .rst_n, .ce, .in, .cfg_le(cfg), .cfg_reg(reg_l), .out(out_l));
  ble #(.IS_MUX4(1'b1)) dut_mux (.clk, .rst_n, .ce, .in, .cfg_le(cfg), .cfg_reg(reg_m), .out(out_m));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic le_lut(logic [5:0] x, logic [63:0] c);
    return c[x];
  endfunction
  function automatic logic le_mux(logic [5:0] x, logic [3:0] inv);
    logic [3:0] d = x[3:0] ^ inv;
    return d[x[5:4]];
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: out=%b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    ce = 0; in = '0; cfg = '0; reg_l = 1; reg_m = 1;
    q_l = 0; q_m = 0;
    repeat (3) @(posedge clk);
    #1 check(out_l, 1'b0, "lut reset"); check(out_m, 1'b0, "mux reset");
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      logic el, em;
      @(negedge clk);
      if (c == 2000) begin
        rst_n = 0; q_l = 0; q_m = 0;
        #1 check(out_l, reg_l ? 1'b0 : le_lut(in, cfg), "lut async reset");
        rst_n = 1;
      end
      in    = 6'($urandom);
      cfg   = {$urandom, $urandom};
      reg_l = 1'($urandom);
      reg_m = 1'($urandom);
      ce    = ($urandom % 4) != 0;
      #1;
      el = le_lut(in, cfg);
      em = le_mux(in, cfg[3:0]);
      check(out_l, reg_l ? q_l : el, "lut before edge");
      check(out_m, reg_m ? q_m : em, "mux before edge");
      @(posedge clk);
      if (ce) begin q_l = el; q_m = em; end
      #1;
      check(out_l, reg_l ? q_l : el, "lut after edge");
      check(out_m, reg_m ? q_m : em, "mux after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
