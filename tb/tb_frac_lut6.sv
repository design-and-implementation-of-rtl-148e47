// tb_frac_lut6: checks the fracturable 6-LUT in both modes over all 256
// input values for 100 random truth tables each. Unfractured, out[0] must
// be the 6-input function of in[5:0] and out[1] the upper half read at
// in[4:0]; fractured, out[0] is the lower 5-LUT on in[4:0] and out[1] the
// upper 5-LUT on {in[7:5], in[1:0]}. It also checks that two independent
// functions (a 5-input AND and a 5-input XOR sharing two inputs) coexist.
module tb_frac_lut6;
  import fpga_pkg::*;
  logic [7:0]    in;
  frac_lut_cfg_t cfg;
  logic [1:0]    out;
  int checks = 0, failures = 0;

  frac_lut6 dut (.in(in), .cfg(cfg), .out(out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [1:0] exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      if (failures < 10) $display("%s: in=%b frac=%b out=%b expected %b", what, in, cfg.frac, out, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      cfg.frac = 1'(t % 2);
      cfg.tt   = {$urandom, $urandom};
      for (int a = 0; a < 256; a++) begin
        logic [63:0] tt;
        logic [5:0]  ia, ib;
        in = 8'(a);
        #1;
        tt = cfg.tt;
        ia = cfg.frac ? {1'b0, in[4:0]} : in[5:0];
        ib = cfg.frac ? {1'b1, in[7:5], in[1:0]} : {1'b1, in[4:0]};
        expect_eq({tt[ib], tt[ia]}, cfg.frac ? "fractured" : "whole");
      end
    end
    // AND5 of in[4:0] in half A, XOR5 of {in[7:5], in[1:0]} in half B
    cfg.frac = 1'b1;
    for (int i = 0; i < 32; i++) begin
      cfg.tt[i]      = (i == 31);
      cfg.tt[32 + i] = ^5'(i);
    end
    for (int a = 0; a < 256; a++) begin
      in = 8'(a);
      #1;
      expect_eq({^{in[7:5], in[1:0]}, &in[4:0]}, "and5_xor5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
