// tb_dual_mux4_le: exhaustive check of the Dual MUX4 over all 256 input
// values for 64 random configurations plus the all-zero and all-one ones,
// against a model written from the element's specification. It then maps
// two independent 3-input functions, f = a ? c : b (MUX4 A, data on pins 0
// and 1) and g = x & y & z (MUX4 B, using ground gating and inversion for
// its constants and pin 2 as its data), and checks both together over all
// their inputs.
module tb_dual_mux4_le;
  import fpga_pkg::*;
  logic [7:0]     in;
  dual_mux4_cfg_t cfg;
  logic [1:0]     out;
  int checks = 0, failures = 0;

  dual_mux4_le dut (.in(in), .cfg(cfg), .out(out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] model(logic [7:0] x, logic [3:0] ia, logic [3:0] gb, logic [3:0] ib);
    logic [3:0] da, db;
    da = x[3:0] ^ ia;
    db = (x[3:0] & ~gb) ^ ib;
    return {db[x[7:6]], da[x[5:4]]};
  endfunction

  task automatic expect_eq(logic [1:0] exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      if (failures < 10) $display("%s: in=%b cfg=%h out=%b expected %b", what, in, cfg, out, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 66; t++) begin
      if (t == 0)      cfg = '0;
      else if (t == 1) cfg = '1;
      else             cfg = dual_mux4_cfg_t'($urandom);
      for (int a = 0; a < 256; a++) begin
        in = 8'(a);
        #1;
        expect_eq(model(in, cfg.inv_a, cfg.gnd_b, cfg.inv_b), "exhaustive");
      end
    end
    // A: sel = {a, a} style is not needed; use sel A = {0, a} via pin a on
    // in[4] and in[5] tied low, data0 = b, data1 = c -> a ? c : b.
    // B: sel = {x, y}; data3 = z, data0..2 grounded -> x & y & z.
    cfg.inv_a = 4'b0000;
    cfg.gnd_b = 4'b0111;
    cfg.inv_b = 4'b0000;
    for (int v = 0; v < 64; v++) begin
      logic a, b, c, x, y, z;
      {a, b, c, x, y, z} = 6'(v);
      // pin 3 is shared: it carries z for B; A never selects it.
      in = {x, y, 1'b0, a, z, 1'b0, c, b};
      #1;
      expect_eq({x & y & z, a ? c : b}, "two_functions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
