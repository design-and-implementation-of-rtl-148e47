// hybrid_fpga_top: the two hybrid CLB architectures side by side.
//
// The nonfracturable CLB (40 inputs, ten 6-input single-output BLEs, four
// MUX4s and six 6-LUTs) and the fracturable CLB (80 inputs, ten 8-input
// two-output BLEs, four Dual MUX4s and six fracturable 6-LUTs) are
// independent alternatives; each has its own cluster inputs, outputs and
// configuration ports, and they share only clock, reset and clock enable.
// The inter-cluster routing that would connect many such tiles is not part
// of this RTL, so the cluster pins are the top's pins.
// Both clusters contain the static combinational loop of their local
// feedback (see clb_nonfrac); a valid configuration leaves it open.
module hybrid_fpga_top
  import fpga_pkg::*;
#(
  parameter int unsigned N_MUX4_NF = N_MUX4_DEF,  // MUX4 BLEs, nonfracturable CLB
  parameter int unsigned N_MUX4_F  = N_MUX4_DEF,  // Dual MUX4 BLEs, fracturable CLB
  parameter int unsigned SW_NF = $clog2(xbar_cands(I_NONFRAC + N_BLE_DEF) + 1),
  parameter int unsigned SW_F  = $clog2(xbar_cands(I_FRAC + O_FRAC * N_BLE_DEF) + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             ce,
  // nonfracturable CLB
  input  logic [I_NONFRAC-1:0]             nf_in,
  input  logic [N_BLE_DEF-1:0][LE_CFG_W-1:0]   nf_cfg_le,
  input  logic [N_BLE_DEF-1:0]                 nf_cfg_reg,
  input  logic [N_BLE_DEF*K_NONFRAC-1:0][SW_NF-1:0] nf_cfg_xbar,
  output logic [N_BLE_DEF-1:0]                 nf_out,
  // fracturable CLB
  input  logic [I_FRAC-1:0]                f_in,
  input  logic [N_BLE_DEF-1:0][FLE_CFG_W-1:0]  f_cfg_le,
  input  logic [N_BLE_DEF-1:0][O_FRAC-1:0]     f_cfg_reg,
  input  logic [N_BLE_DEF*K_FRAC-1:0][SW_F-1:0] f_cfg_xbar,
  output logic [O_FRAC*N_BLE_DEF-1:0]          f_out
);

  clb_nonfrac #(.N_MUX4(N_MUX4_NF), .SW(SW_NF)) u_clb_nf (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .clb_in   (nf_in),
    .cfg_le   (nf_cfg_le),
    .cfg_reg  (nf_cfg_reg),
    .cfg_xbar (nf_cfg_xbar),
    .clb_out  (nf_out)
  );

  clb_frac #(.N_MUX4(N_MUX4_F), .SW(SW_F)) u_clb_f (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .clb_in   (f_in),
    .cfg_le   (f_cfg_le),
    .cfg_reg  (f_cfg_reg),
    .cfg_xbar (f_cfg_xbar),
    .clb_out  (f_out)
  );

endmodule
