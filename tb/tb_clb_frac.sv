// tb_clb_frac: checks the hybrid fracturable CLB at every MUX4:LUT mix
// of the architecture sweep, 1:9 through 5:5, with one cluster per mix
// running in parallel. Each cluster is driven by clb_frac_chk, which loads
// random configurations and compares every output, every cycle, with its
// reference model. The clock enable is random (low one cycle in four).
// Every mechanism the checker counts must have happened at least once.
module tb_clb_frac;
  import fpga_pkg::*;
  localparam int N_MIX = 5;
  localparam int SW = $clog2(xbar_cands(I_FRAC + O_FRAC*N_BLE_DEF) + 1);
  localparam string EV_NAME [8] = '{"Dual MUX4 ground gating","fractured LUT","whole 6-LUT","registered output","bypassed output","feedback pin","register hold (ce=0)","register load"};

  logic clk = 0, rst_n = 0, ce = 1;
  logic [N_MIX-1:0] done;
  int chk_c [N_MIX], chk_f [N_MIX];
  int ev [N_MIX][8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar m = 0; m < N_MIX; m++) begin : g_mix
    logic [I_FRAC-1:0] clb_in;
    logic [N_BLE_DEF-1:0][FLE_CFG_W-1:0] cfg_le;
    logic [N_BLE_DEF-1:0][O_FRAC-1:0] cfg_reg;
    logic [N_BLE_DEF*K_FRAC-1:0][SW-1:0] cfg_xbar;
    logic [O_FRAC*N_BLE_DEF-1:0] clb_out;

    clb_frac #(.N_MUX4(m + 1)) dut (
      .clk, .rst_n, .ce, .clb_in, .cfg_le, .cfg_reg, .cfg_xbar, .clb_out
    );
    clb_frac_chk #(.N_MUX4(m + 1), .N_TRIALS(30), .CYC(12)) chk (
      .clk, .rst_n, .ce, .clb_in, .cfg_le, .cfg_reg, .cfg_xbar, .clb_out,
      .done(done[m]), .checks(chk_c[m]), .failures(chk_f[m]), .ev(ev[m])
    );
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) ce <= ($urandom % 4) != 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (&done);
    for (int m = 0; m < N_MIX; m++) begin
      checks   += chk_c[m];
      failures += chk_f[m];
      $display("mix %0d:%0d  checks=%0d failures=%0d", m + 1, N_BLE_DEF - m - 1, chk_c[m], chk_f[m]);
    end
    for (int e = 0; e < 8; e++) begin
      automatic int tot = 0;
      for (int m = 0; m < N_MIX; m++) tot += ev[m][e];
      $display("  %-24s %0d", EV_NAME[e], tot);
      checks++;
      if (tot == 0) begin
        failures++;
        $display("  mechanism never exercised: %s", EV_NAME[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
