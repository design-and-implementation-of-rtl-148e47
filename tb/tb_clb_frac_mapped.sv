// tb_clb_frac_mapped: small functions mapped by hand onto one hybrid
// fracturable cluster at its default mix (BLEs 0-3 Dual MUX4, 4-9
// fracturable 6-LUTs), showing what each element packs.
//
// Cluster inputs 0-3 carry a 4-bit data word d, 4-5 select sa, 6-7 select
// sb. Every BLE pin i takes cluster input i, which satisfies the 50%
// crossbar's parity rule.
//   BLE 0 (Dual MUX4, both outputs registered): a 4x2 switch,
//         y0 = d[sa], y1 = d[sb], the shared-data / dedicated-select case.
//   BLE 1 (Dual MUX4, bypassed): z0 = ~d[sa] (inversion on all data),
//         z1 = sb1 & sb0 & d3 (ground gating supplies the zeros).
//   BLE 4 (fractured LUT, bypassed): u0 = ^{d, sa0} on in[4:0],
//         u1 = (sa1 == sb1) & (d0 | d1) on {in[7:5], in[1:0]}.
//   BLE 5 (whole 6-LUT, bypassed): w = carry({d1,d0} + sa) ^ (d2 & d3).
// Random inputs for 2000 cycles; registered outputs are checked one cycle
// after their inputs.
module tb_clb_frac_mapped;
  import fpga_pkg::*;
  localparam int N_SRC = I_FRAC + O_FRAC * N_BLE_DEF;
  localparam int NC    = xbar_cands(N_SRC);
  localparam int SW    = $clog2(NC + 1);

  logic clk = 0, rst_n = 0, ce = 1;
  logic [I_FRAC-1:0]                      clb_in;
  logic [N_BLE_DEF-1:0][FLE_CFG_W-1:0]    cfg_le;
  logic [N_BLE_DEF-1:0][O_FRAC-1:0]       cfg_reg;
  logic [N_BLE_DEF*K_FRAC-1:0][SW-1:0]    cfg_xbar;
  logic [O_FRAC*N_BLE_DEF-1:0]            clb_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clb_frac dut (.clk, .rst_n, .ce, .clb_in, .cfg_le, .cfg_reg, .cfg_xbar, .clb_out);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: %b expected %b", $time, what, got, exp);
    end
  endtask

  logic [3:0] d;
  logic [1:0] sa, sb;
  logic [1:0] y_q;      // model of BLE 0's registers

  initial begin
    dual_mux4_cfg_t dm;
    frac_lut_cfg_t  fl;
    cfg_le = '0; cfg_reg = '0; clb_in = '0;
    // every BLE pin i reads cluster input i: code k = (i - i mod 2) / 2
    for (int b = 0; b < N_BLE_DEF; b++)
      for (int i = 0; i < K_FRAC; i++)
        cfg_xbar[b * K_FRAC + i] = SW'(i / 2);
    // BLE 0: 4x2 switch, registered
    dm = '{inv_a: 4'b0000, gnd_b: 4'b0000, inv_b: 4'b0000};
    cfg_le[0] = FLE_CFG_W'(dm);
    cfg_reg[0] = 2'b11;
    // BLE 1: inverted select and a 3-input AND
    dm = '{inv_a: 4'b1111, gnd_b: 4'b0111, inv_b: 4'b0000};
    cfg_le[1] = FLE_CFG_W'(dm);
    // BLE 4: fractured LUT
    fl.frac = 1'b1;
    for (int a = 0; a < 32; a++) begin
      automatic logic [4:0] x = 5'(a);
      fl.tt[a]      = ^x;                               // in[4:0]
      fl.tt[32 + a] = (x[4] == x[2]) & (x[0] | x[1]);   // {in7, in6, in5, in1, in0}
    end
    cfg_le[4] = fl;
    // BLE 5: whole 6-LUT
    fl.frac = 1'b0;
    for (int a = 0; a < 64; a++) begin
      automatic logic [5:0] x = 6'(a);
      automatic logic [2:0] s = {1'b0, x[1:0]} + {1'b0, x[5:4]};
      fl.tt[a] = s[2] ^ (x[2] & x[3]);
    end
    cfg_le[5] = fl;

    y_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      logic [2:0] s;
      @(negedge clk);
      d  = 4'($urandom); sa = 2'($urandom); sb = 2'($urandom);
      clb_in[7:0] = {sb, sa, d};
      #1;
      s = {1'b0, d[1:0]} + {1'b0, sa};
      check(clb_out[0], y_q[0], "y0 = d[sa] (registered)");
      check(clb_out[1], y_q[1], "y1 = d[sb] (registered)");
      check(clb_out[2], ~d[sa], "z0 = ~d[sa]");
      check(clb_out[3], sb[1] & sb[0] & d[3], "z1 = sb1 & sb0 & d3");
      check(clb_out[8], ^{sa[0], d}, "u0 = parity");
      check(clb_out[9], (sa[1] == sb[1]) & (d[0] | d[1]), "u1");
      check(clb_out[10], s[2] ^ (d[2] & d[3]), "w");
      @(posedge clk);
      y_q = {d[sb], d[sa]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
