// ble_frac: fracturable basic logic element: an 8-input, 2-output logic
// element with an optional register on each output.
//
// The logic element is a fracturable 6-LUT (IS_MUX4 = 0) or a Dual MUX4
// (IS_MUX4 = 1). Each of its two outputs feeds its own D flip-flop and a
// 2-to-1 bypass multiplexer set by one SRAM bit (cfg_reg[j] = 1 selects the
// flip-flop). Two LE outputs, two registers and two output multiplexers
// follow the architecture description; clock enable and the asynchronous
// active-low reset to 0 are this design's own choices, as in the
// nonfracturable BLE. A Dual MUX4 BLE uses only the low $bits(dual_mux4_cfg_t)
// bits of cfg_le.
//
// Timing: out[j] is combinational from in when cfg_reg[j] = 0, else the
// value captured at the last rising clk edge with ce = 1.
module ble_frac
  import fpga_pkg::*;
#(
  parameter bit IS_MUX4 = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic [K_FRAC-1:0]    in,
  input  logic [FLE_CFG_W-1:0] cfg_le,
  input  logic [O_FRAC-1:0]    cfg_reg,
  output logic [O_FRAC-1:0]    out
);

  localparam int unsigned DW = $bits(dual_mux4_cfg_t);

  logic [O_FRAC-1:0] le_out;
  logic [O_FRAC-1:0] q;

  if (IS_MUX4) begin : g_mux4
    dual_mux4_le u_le (.in(in), .cfg(dual_mux4_cfg_t'(cfg_le[DW-1:0])), .out(le_out));
  end else begin : g_lut
    frac_lut6 u_le (.in(in), .cfg(frac_lut_cfg_t'(cfg_le)), .out(le_out));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (ce) q <= le_out;

  always_comb
    for (int j = 0; j < O_FRAC; j++)
      out[j] = cfg_reg[j] ? q[j] : le_out[j];

endmodule
