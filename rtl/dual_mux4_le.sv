// dual_mux4_le: the Dual MUX4 logic element, two MUX4s in one 8-input,
// 2-output fracturable LE.
//
// Pins: in[3:0] are four data inputs shared by both MUX4s, in[5:4] the
// dedicated select lines of MUX4 A (out[0]) and in[7:6] those of MUX4 B
// (out[1]); the lower index is the select LSB. MUX4 A is a plain MUX4 with
// per-input inversion. In MUX4 B each shared data input first passes a
// 2-to-1 multiplexer that can replace it with logic 0 (cfg.gnd_b), then the
// optional inverter (cfg.inv_b), so B can take constants 0/1 on any data
// input and realise a 3-input function independent of A. The ground gating
// and the shared-data/dedicated-select wiring are read from the architecture
// figure; the pin numbering is this design's own. Purely combinational.
module dual_mux4_le
  import fpga_pkg::*;
(
  input  logic [7:0]     in,   // [3:0] shared data, [5:4] sel A, [7:6] sel B
  input  dual_mux4_cfg_t cfg,
  output logic [1:0]     out   // [0] = MUX4 A, [1] = MUX4 B
);

  logic [3:0] gated_b;   // B's data after the ground multiplexers

  always_comb
    for (int i = 0; i < 4; i++)
      gated_b[i] = cfg.gnd_b[i] ? 1'b0 : in[i];

  mux4_le u_mux_a (
    .in      ({in[5:4], in[3:0]}),
    .cfg_inv (cfg.inv_a),
    .out     (out[0])
  );

  mux4_le u_mux_b (
    .in      ({in[7:6], gated_b}),
    .cfg_inv (cfg.inv_b),
    .out     (out[1])
  );

endmodule
