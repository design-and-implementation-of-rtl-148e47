// tb_ble_frac: checks the fracturable BLE, one fracturable-LUT instance and
// one Dual MUX4 instance side by side, with random inputs, configuration,
// per-output bypass bits and clock enable every cycle. Both outputs of both
// instances are compared, before and after each rising edge, with a model
// of the LE (written from its specification) and of the two registers.
module tb_ble_frac;
  import fpga_pkg::*;
  logic clk = 0, rst_n = 0, ce;
  logic [7:0]  in;
  logic [64:0] cfg;
  logic [1:0]  reg_l, reg_m;
  logic [1:0]  out_l, out_m;
  logic [1:0]  q_l, q_m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ble_frac #(.IS_MUX4(1'b0)) dut_lut (.clk, .rst_n, .ce, .in, .cfg_le(cfg), .cfg_reg(reg_l), .out(out_l));
  ble_frac #(.IS_MUX4(1'b1)) dut_mux (.clk, .rst_n, .ce, .in, .cfg_le(cfg), .cfg_reg(reg_m), .out(out_m));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] le_lut(logic [7:0] x, logic [64:0] c);
    if (!c[64]) return {c[32 + int'(x[4:0])], c[x[5:0]]};
    return {c[32 + int'({x[7:5], x[1:0]})], c[x[4:0]]};
  endfunction
  function automatic logic [1:0] le_mux(logic [7:0] x, logic [11:0] c);
    logic [3:0] da, db;
    da = x[3:0] ^ c[11:8];
    db = (x[3:0] & ~c[7:4]) ^ c[3:0];
    return {db[x[7:6]], da[x[5:4]]};
  endfunction

  function automatic logic [1:0] pick(logic [1:0] r, logic [1:0] q, logic [1:0] e);
    return (r & q) | (~r & e);
  endfunction

  task automatic check(logic [1:0] got, logic [1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: out=%b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    ce = 0; in = '0; cfg = '0; reg_l = '1; reg_m = '1;
    q_l = 0; q_m = 0;
    repeat (3) @(posedge clk);
    #1 check(out_l, 2'b00, "lut reset"); check(out_m, 2'b00, "mux reset");
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      logic [1:0] el, em;
      @(negedge clk);
      in    = 8'($urandom);
      cfg   = {1'($urandom), $urandom, $urandom};
      reg_l = 2'($urandom);
      reg_m = 2'($urandom);
      ce    = ($urandom % 4) != 0;
      #1;
      el = le_lut(in, cfg);
      em = le_mux(in, cfg[11:0]);
      check(out_l, pick(reg_l, q_l, el), "lut before edge");
      check(out_m, pick(reg_m, q_m, em), "mux before edge");
      @(posedge clk);
      if (ce) begin q_l = el; q_m = em; end
      #1;
      check(out_l, pick(reg_l, q_l, el), "lut after edge");
      check(out_m, pick(reg_m, q_m, em), "mux after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
