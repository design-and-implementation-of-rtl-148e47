// frac_lut6: fracturable 6-LUT with eight inputs and two outputs, the LUT
// counterpart of the Dual MUX4 in the fracturable BLE.
//
// The 64 truth-table bits form two 5-LUT halves, A = tt[31:0] and
// B = tt[63:32]. With cfg.frac = 0 it is one 6-LUT on in[5:0]:
// out[0] = tt[in[5:0]] (in[5] picks the half), and out[1] is half B read at
// in[4:0]. With cfg.frac = 1 it is two 5-LUTs that share in[1:0]:
// out[0] = A[in[4:0]] and out[1] = B[{in[7:5], in[1:0]}]. The architecture
// only states an 8-input, 2-output LE modelled on an adaptive LUT that can
// be split into two smaller LUTs with restrictions on their inputs; this
// particular split (two shared inputs) is this design's own choice.
// Purely combinational.
module frac_lut6
  import fpga_pkg::*;
(
  input  logic [7:0]    in,
  input  frac_lut_cfg_t cfg,
  output logic [1:0]    out
);

  logic [4:0] idx_b;      // address of half B
  logic       a5, b5;     // 5-LUT outputs

  always_comb idx_b = cfg.frac ? {in[7:5], in[1:0]} : in[4:0];

  lut6 #(.K(5)) u_half_a (.in(in[4:0]), .cfg(cfg.tt[31:0]),  .out(a5));
  lut6 #(.K(5)) u_half_b (.in(idx_b),   .cfg(cfg.tt[63:32]), .out(b5));

  always_comb begin
    out[0] = (!cfg.frac && in[5]) ? b5 : a5;
    out[1] = b5;
  end

endmodule
