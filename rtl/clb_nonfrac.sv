// clb_nonfrac: hybrid nonfracturable complex logic block.
//
// N_IN cluster inputs and N_BLE single-output BLEs (default 40 and 10). The
// first N_MUX4 BLEs hold a MUX4 logic element, the rest a 6-LUT (default
// 4:6, the mix the architecture study found best; 1:9 to 5:5 were swept).
// A 50% depopulated crossbar feeds each BLE's six inputs from the cluster
// inputs and from all BLE outputs (local feedback). BLE outputs are the
// cluster outputs.
//
// Configuration is presented as ports (the loading mechanism is outside the
// block): cfg_le[b] is BLE b's truth table (LUT) or inversion bits
// (MUX4, low 4 bits), cfg_reg[b] its register-bypass bit, cfg_xbar[b*6+i]
// the crossbar select of BLE b input i (see xbar for the code).
//
// Combinational loops: the feedback path xbar -> BLE -> xbar is a static
// loop; it is only a real loop if the configuration routes an unregistered
// BLE output back into its own fan-in cone, which a valid configuration
// must avoid, exactly as in an FPGA fabric.
module clb_nonfrac
  import fpga_pkg::*;
#(
  parameter int unsigned N_IN   = I_NONFRAC,
  parameter int unsigned N_BLE  = N_BLE_DEF,
  parameter int unsigned N_MUX4 = N_MUX4_DEF,
  parameter int unsigned K      = K_NONFRAC,
  parameter int unsigned N_SRC  = N_IN + N_BLE,
  parameter int unsigned SW     = $clog2(xbar_cands(N_SRC) + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ce,
  input  logic [N_IN-1:0]               clb_in,
  input  logic [N_BLE-1:0][LE_CFG_W-1:0] cfg_le,
  input  logic [N_BLE-1:0]              cfg_reg,
  input  logic [N_BLE*K-1:0][SW-1:0]    cfg_xbar,
  output logic [N_BLE-1:0]              clb_out
);

  if (N_MUX4 > N_BLE) begin : g_bad_mix
    $error("N_MUX4 (%0d) exceeds the number of BLEs (%0d)", N_MUX4, N_BLE);
  end

  logic [N_SRC-1:0]   src;
  logic [N_BLE*K-1:0] ble_in;

  always_comb src = {clb_out, clb_in};

  xbar #(.N_SRC(N_SRC), .N_DST(N_BLE*K), .SW(SW)) u_xbar (
    .src (src),
    .sel (cfg_xbar),
    .dst (ble_in)
  );

  for (genvar b = 0; b < N_BLE; b++) begin : g_ble
    ble #(.IS_MUX4(b < N_MUX4)) u_ble (
      .clk     (clk),
      .rst_n   (rst_n),
      .ce      (ce),
      .in      (ble_in[b*K +: K]),
      .cfg_le  (cfg_le[b]),
      .cfg_reg (cfg_reg[b]),
      .out     (clb_out[b])
    );
  end

endmodule
