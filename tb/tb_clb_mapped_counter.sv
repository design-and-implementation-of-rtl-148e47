// tb_clb_mapped_counter: a small circuit mapped by hand onto one hybrid
// nonfracturable cluster at its default 4:6 mix, the way a MUX4-aware
// mapper and packer would place it: MUX4-embeddable functions go to MUX4
// BLEs, the others to 6-LUTs.
//
// Circuit: 4-bit counter with synchronous load (load has priority) and
// count enable, plus a combinational terminal count tc = en & (q == 15).
//   BLE 0 (MUX4, registered)  q0' = load ? d0 : q0 ^ en
//                             selects {en, load}, data {d0, ~q0, d0, q0}
//   BLE 1 (MUX4, bypassed)    c = q0 & q1 & q2   (3-input AND)
//   BLE 2 (MUX4, bypassed)    tc = c & q3 & en
//   BLE 5 (LUT, registered)   q1' = load ? d1 : q1 ^ (en & q0)
//   BLE 7 (LUT, registered)   q2' = load ? d2 : q2 ^ (en & q0 & q1)
//   BLE 8 (LUT, registered)   q3' = load ? d3 : q3 ^ (en & c)
// Cluster inputs: load = 0, d0 = 1, en = 3, d1 = 4, d2 = 6, d3 = 8. Each
// signal is put on a BLE pin of matching parity, as the 50% crossbar
// requires (pin p reaches source 2k + (p mod 2)), and the LUT truth tables
// are computed from that pin assignment. The counter is compared with a
// model for 3000 cycles of random load, enable, data and clock enable.
module tb_clb_mapped_counter;
  import fpga_pkg::*;
  localparam int N_SRC = I_NONFRAC + N_BLE_DEF;
  localparam int NC    = xbar_cands(N_SRC);
  localparam int SW    = $clog2(NC + 1);
  localparam int CONST0 = -1;
  // source indices
  localparam int S_LOAD = 0, S_D0 = 1, S_EN = 3, S_D1 = 4, S_D2 = 6, S_D3 = 8;
  localparam int S_Q0 = I_NONFRAC + 0, S_C = I_NONFRAC + 1, S_Q1 = I_NONFRAC + 5,
                 S_Q2 = I_NONFRAC + 7, S_Q3 = I_NONFRAC + 8;

  logic clk = 0, rst_n = 0, ce = 1;
  logic [I_NONFRAC-1:0]                      clb_in;
  logic [N_BLE_DEF-1:0][LE_CFG_W-1:0]        cfg_le;
  logic [N_BLE_DEF-1:0]                      cfg_reg;
  logic [N_BLE_DEF*K_NONFRAC-1:0][SW-1:0]    cfg_xbar;
  logic [N_BLE_DEF-1:0]                      clb_out;
  int checks = 0, failures = 0;
  int loads = 0, incs = 0, holds = 0, wraps = 0, tcs = 0;

  always #5 clk = ~clk;

  clb_nonfrac dut (.clk, .rst_n, .ce, .clb_in, .cfg_le, .cfg_reg, .cfg_xbar, .clb_out);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // route source s to input pin i of BLE b
  task automatic route(int b, int i, int s);
    int p = b * K_NONFRAC + i;
    if (s == CONST0) begin
      cfg_xbar[p] = SW'(NC);
    end else begin
      if (s % 2 != p % 2) $fatal(1, "source %0d cannot reach pin %0d", s, p);
      cfg_xbar[p] = SW'((s - p % 2) / 2);
    end
  endtask

  // LUT truth table for q' = load ? d : q ^ t, where pin positions of
  // load, d, q are given and t is the AND of the listed pins
  function automatic logic [63:0] count_lut(int p_load, int p_d, int p_q, logic [5:0] t_pins);
    logic [63:0] tt;
    for (int a = 0; a < 64; a++) begin
      logic [5:0] x = 6'(a);
      logic t = &(x | ~t_pins);
      tt[a] = x[p_load] ? x[p_d] : (x[p_q] ^ t);
    end
    return tt;
  endfunction

  logic [3:0] cnt;     // model
  logic       load, en;
  logic [3:0] d;

  initial begin
    cfg_le = '0; cfg_reg = '1; cfg_xbar = '1; clb_in = '0;
    // BLE 0: MUX4 bit 0
    route(0, 0, S_Q0); route(0, 1, S_D0); route(0, 2, S_Q0); route(0, 3, S_D0);
    route(0, 4, S_LOAD); route(0, 5, S_EN);
    cfg_le[0][3:0] = 4'b0100; cfg_reg[0] = 1'b1;
    // BLE 1: MUX4 c = q0 & q1 & q2
    route(1, 0, CONST0); route(1, 1, CONST0); route(1, 2, CONST0); route(1, 3, S_Q2);
    route(1, 4, S_Q0); route(1, 5, S_Q1);
    cfg_le[1][3:0] = 4'b0000; cfg_reg[1] = 1'b0;
    // BLE 2: MUX4 tc = c & q3 & en
    route(2, 0, CONST0); route(2, 1, CONST0); route(2, 2, CONST0); route(2, 3, S_EN);
    route(2, 4, S_Q3); route(2, 5, S_C);
    cfg_le[2][3:0] = 4'b0000; cfg_reg[2] = 1'b0;
    // BLE 5: LUT bit 1, pins: load en q0 q1 d1 -
    route(5, 0, S_LOAD); route(5, 1, S_EN); route(5, 2, S_Q0); route(5, 3, S_Q1);
    route(5, 4, S_D1); route(5, 5, CONST0);
    cfg_le[5] = count_lut(0, 4, 3, 6'b000110);
    // BLE 7: LUT bit 2, pins: load en q0 q1 d2 q2
    route(7, 0, S_LOAD); route(7, 1, S_EN); route(7, 2, S_Q0); route(7, 3, S_Q1);
    route(7, 4, S_D2); route(7, 5, S_Q2);
    cfg_le[7] = count_lut(0, 4, 5, 6'b001110);
    // BLE 8: LUT bit 3, pins: load en q3 c d3 -
    route(8, 0, S_LOAD); route(8, 1, S_EN); route(8, 2, S_Q3); route(8, 3, S_C);
    route(8, 4, S_D3); route(8, 5, CONST0);
    cfg_le[8] = count_lut(0, 4, 2, 6'b001010);

    cnt = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      logic [3:0] got;
      logic       tc_exp;
      @(negedge clk);
      load = ($urandom % 16) == 0;
      en   = ($urandom % 4) != 0;
      d    = 4'($urandom);
      ce   = ($urandom % 8) != 0;
      clb_in[S_LOAD] = load; clb_in[S_EN] = en;
      clb_in[S_D0] = d[0]; clb_in[S_D1] = d[1]; clb_in[S_D2] = d[2]; clb_in[S_D3] = d[3];
      #1;
      got    = {clb_out[8], clb_out[7], clb_out[5], clb_out[0]};
      tc_exp = en && cnt == 4'hf;
      checks += 2;
      if (got !== cnt) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d expected %0d", c, got, cnt);
      end
      if (clb_out[2] !== tc_exp) begin
        failures++;
        if (failures < 10) $display("cycle %0d: tc %b expected %b", c, clb_out[2], tc_exp);
      end
      if (tc_exp) tcs++;
      @(posedge clk);
      if (!ce) holds++;
      else if (load) begin cnt = d; loads++; end
      else if (en) begin
        if (cnt == 4'hf) wraps++;
        cnt = cnt + 1'b1; incs++;
      end
    end
    $display("loads=%0d increments=%0d clock-enable holds=%0d wraps=%0d terminal counts=%0d",
             loads, incs, holds, wraps, tcs);
    checks++;
    if (loads == 0 || incs == 0 || holds == 0 || wraps == 0 || tcs == 0) begin
      failures++;
      $display("a counter behaviour was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
