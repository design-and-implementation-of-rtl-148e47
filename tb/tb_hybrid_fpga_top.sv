// tb_hybrid_fpga_top: end-to-end test of the top level at its default
// parameters: the nonfracturable CLB (4 MUX4 + 6 LUT BLEs) and the
// fracturable CLB (4 Dual MUX4 + 6 fracturable-LUT BLEs) side by side,
// sharing clock, reset and a random clock enable.
//
// Each CLB is driven through the top's ports by its checker, which loads
// random configurations (acyclic through the local feedback) and compares
// every cluster output every cycle with a reference model. Afterwards the
// test requires that each mechanism of both clusters occurred at least
// once: MUX4 inversion, LUT use, Dual MUX4 ground gating, fractured and
// whole 6-LUT, registered and bypassed outputs, crossbar feedback and
// constant inputs, and register hold and load under the clock enable.
module tb_hybrid_fpga_top;
  import fpga_pkg::*;
  localparam int SW_NF = $clog2(xbar_cands(I_NONFRAC + N_BLE_DEF) + 1);
  localparam int SW_F  = $clog2(xbar_cands(I_FRAC + O_FRAC * N_BLE_DEF) + 1);
  localparam string EV_NF [8] = '{"nf: MUX4 inversion", "nf: 6-LUT", "nf: registered output",
                                  "nf: bypassed output", "nf: feedback pin", "nf: constant-0 pin",
                                  "nf: register hold (ce=0)", "nf: register load"};
  localparam string EV_F [8] = '{"f: Dual MUX4 ground gating", "f: fractured LUT", "f: whole 6-LUT",
                                 "f: registered output", "f: bypassed output", "f: feedback pin",
                                 "f: register hold (ce=0)", "f: register load"};

  logic clk = 0, rst_n = 0, ce = 1;

  logic [I_NONFRAC-1:0]                    nf_in;
  logic [N_BLE_DEF-1:0][LE_CFG_W-1:0]      nf_cfg_le;
  logic [N_BLE_DEF-1:0]                    nf_cfg_reg;
  logic [N_BLE_DEF*K_NONFRAC-1:0][SW_NF-1:0] nf_cfg_xbar;
  logic [N_BLE_DEF-1:0]                    nf_out;
  logic [I_FRAC-1:0]                       f_in;
  logic [N_BLE_DEF-1:0][FLE_CFG_W-1:0]     f_cfg_le;
  logic [N_BLE_DEF-1:0][O_FRAC-1:0]        f_cfg_reg;
  logic [N_BLE_DEF*K_FRAC-1:0][SW_F-1:0]   f_cfg_xbar;
  logic [O_FRAC*N_BLE_DEF-1:0]             f_out;

  logic done_nf, done_f;
  int   c_nf, f_nf, c_f, f_f;
  int   ev_nf [8], ev_f [8];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  hybrid_fpga_top dut (
    .clk, .rst_n, .ce,
    .nf_in, .nf_cfg_le, .nf_cfg_reg, .nf_cfg_xbar, .nf_out,
    .f_in, .f_cfg_le, .f_cfg_reg, .f_cfg_xbar, .f_out
  );

  clb_nonfrac_chk #(.N_TRIALS(100), .CYC(16)) chk_nf (
    .clk, .rst_n, .ce, .clb_in(nf_in), .cfg_le(nf_cfg_le), .cfg_reg(nf_cfg_reg),
    .cfg_xbar(nf_cfg_xbar), .clb_out(nf_out),
    .done(done_nf), .checks(c_nf), .failures(f_nf), .ev(ev_nf)
  );

  clb_frac_chk #(.N_TRIALS(100), .CYC(16)) chk_f (
    .clk, .rst_n, .ce, .clb_in(f_in), .cfg_le(f_cfg_le), .cfg_reg(f_cfg_reg),
    .cfg_xbar(f_cfg_xbar), .clb_out(f_out),
    .done(done_f), .checks(c_f), .failures(f_f), .ev(ev_f)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) ce <= ($urandom % 4) != 0;

  task automatic need(string name, int count);
    $display("  %-30s %0d", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done_nf && done_f);
    checks   += c_nf + c_f;
    failures += f_nf + f_f;
    $display("nonfracturable CLB: checks=%0d failures=%0d", c_nf, f_nf);
    $display("fracturable CLB:    checks=%0d failures=%0d", c_f, f_f);
    for (int e = 0; e < 8; e++) need(EV_NF[e], ev_nf[e]);
    for (int e = 0; e < 8; e++) need(EV_F[e], ev_f[e]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
