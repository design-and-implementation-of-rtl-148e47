// ble: nonfracturable basic logic element: a 6-input logic element followed
// by an optional register.
//
// The logic element is a 6-LUT (IS_MUX4 = 0) or a MUX4 (IS_MUX4 = 1). Its
// output feeds a D flip-flop and, through a 2-to-1 multiplexer set by one
// SRAM bit (cfg_reg = 1 selects the flip-flop), the BLE output. The LE, the
// flip-flop and the bypass multiplexer follow the architecture description.
// The flip-flop's clock enable follows the remark that whether the register
// stores a value is set by its clock and enable; the asynchronous active-low
// reset to 0 is this design's own choice. A MUX4 BLE uses only
// cfg_le[3:0]; the other bits are ignored.
//
// Timing: combinational path in -> out when cfg_reg = 0; with cfg_reg = 1
// out shows the LE value captured at the last rising clk edge with ce = 1.
module ble
  import fpga_pkg::*;
#(
  parameter bit IS_MUX4 = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,       // register clock enable
  input  logic [K_NONFRAC-1:0] in,
  input  logic [LE_CFG_W-1:0]  cfg_le,   // LUT truth table or MUX4 inversion bits
  input  logic                 cfg_reg,  // 1 = registered output
  output logic                 out
);

  logic le_out;
  logic q;

  if (IS_MUX4) begin : g_mux4
    mux4_le u_le (.in(in), .cfg_inv(mux4_cfg_t'(cfg_le[3:0])), .out(le_out));
  end else begin : g_lut
    lut6 #(.K(K_NONFRAC)) u_le (.in(in), .cfg(cfg_le), .out(le_out));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= 1'b0;
    else if (ce) q <= le_out;

  always_comb out = cfg_reg ? q : le_out;

endmodule
