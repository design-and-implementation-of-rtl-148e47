// mux4_le: the MUX4 logic element, a hardened 4-to-1 multiplexer with
// optional inversion on each data input.
//
// Six inputs, one output. in[3:0] are the data inputs and in[5:4] the two
// select lines (in[4] is the select LSB). Each data input passes through a
// 2-to-1 multiplexer that picks the input or its complement under one SRAM
// bit (cfg_inv[i] = 1 inverts), then a 4-to-1 multiplexer built from three
// 2-to-1 multiplexers picks one of the four results: seven 2-to-1 muxes,
// four inverters and four SRAM cells in all, as the architecture describes.
// Any 2- or 3-input function, and those 4..6-input functions whose Shannon
// cofactors over two variables each depend on at most one variable, map
// onto it. Which pin is which, and the select bit order, are this design's
// own choice. Purely combinational.
module mux4_le
  import fpga_pkg::*;
(
  input  logic [5:0] in,      // [3:0] data, [5:4] select
  input  mux4_cfg_t  cfg_inv, // per-data-input inversion bits
  output logic       out
);

  logic [3:0] d;       // data after optional inversion
  logic [1:0] lvl1;    // first level of the 4:1 tree

  always_comb begin
    for (int i = 0; i < 4; i++)
      d[i] = cfg_inv[i] ? ~in[i] : in[i];
    lvl1[0] = in[4] ? d[1] : d[0];
    lvl1[1] = in[4] ? d[3] : d[2];
    out     = in[5] ? lvl1[1] : lvl1[0];
  end

endmodule
