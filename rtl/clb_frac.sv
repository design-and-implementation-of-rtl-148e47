// clb_frac: hybrid fracturable complex logic block.
//
// N_IN cluster inputs and N_BLE two-output BLEs with eight inputs each
// (default 80 and 10). The first N_MUX4 BLEs hold a Dual MUX4 logic
// element, the rest a fracturable 6-LUT. A 50% depopulated crossbar feeds
// each BLE's eight inputs from the cluster inputs and from all 2*N_BLE BLE
// outputs. Cluster output 2b+j is output j of BLE b.
//
// Configuration ports: cfg_le[b] is BLE b's LE word (frac_lut_cfg_t for a
// LUT, dual_mux4_cfg_t in the low bits for a Dual MUX4), cfg_reg[b][j] the
// register-bypass bit of output j, cfg_xbar[b*8+i] the crossbar select of
// BLE b input i. The default MUX4 count of 4 is this design's choice: the
// fracturable mix was swept over the same range as the nonfracturable one
// without a single best ratio being named.
//
// Combinational loops: as in clb_nonfrac, the feedback path is a static
// loop that a valid configuration never closes through unregistered outputs.
module clb_frac
  import fpga_pkg::*;
#(
  parameter int unsigned N_IN   = I_FRAC,
  parameter int unsigned N_BLE  = N_BLE_DEF,
  parameter int unsigned N_MUX4 = N_MUX4_DEF,
  parameter int unsigned K      = K_FRAC,
  parameter int unsigned N_SRC  = N_IN + O_FRAC * N_BLE,
  parameter int unsigned SW     = $clog2(xbar_cands(N_SRC) + 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            ce,
  input  logic [N_IN-1:0]                 clb_in,
  input  logic [N_BLE-1:0][FLE_CFG_W-1:0] cfg_le,
  input  logic [N_BLE-1:0][O_FRAC-1:0]    cfg_reg,
  input  logic [N_BLE*K-1:0][SW-1:0]      cfg_xbar,
  output logic [O_FRAC*N_BLE-1:0]         clb_out
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
    ble_frac #(.IS_MUX4(b < N_MUX4)) u_ble (
      .clk     (clk),
      .rst_n   (rst_n),
      .ce      (ce),
      .in      (ble_in[b*K +: K]),
      .cfg_le  (cfg_le[b]),
      .cfg_reg (cfg_reg[b]),
      .out     (clb_out[O_FRAC*b +: O_FRAC])
    );
  end

endmodule
