// xbar: 50% depopulated intra-CLB crossbar.
//
// Every destination (an LE input pin) is a multiplexer over half of the
// sources (the CLB inputs followed by the BLE outputs fed back). Pin p
// reaches the sources whose index has the parity of p: candidate k of pin p
// is source 2k + (p mod 2). Its select word sel[p] holds k; a value that
// names no source (k >= NC, or 2k + (p mod 2) >= N_SRC) drives logic 0,
// which gives the LE a constant input. The 50% population is the
// architecture's; the parity pattern, the feedback and the constant-0
// code are this design's own choices. Purely combinational.
module xbar #(
  parameter int unsigned N_SRC = 50,               // 40 CLB inputs + 10 BLE outputs
  parameter int unsigned N_DST = 60,               // 10 BLEs x 6 inputs
  parameter int unsigned NC    = (N_SRC + 1) / 2,  // candidates per pin
  parameter int unsigned SW    = $clog2(NC + 1)    // select width, room for the 0 code
) (
  input  logic [N_SRC-1:0]          src,
  input  logic [N_DST-1:0][SW-1:0]  sel,
  output logic [N_DST-1:0]          dst
);

  always_comb
    for (int p = 0; p < N_DST; p++) begin
      automatic int unsigned s = 2 * int'(sel[p]) + (p % 2);
      dst[p] = (int'(sel[p]) < NC && s < N_SRC) ? src[s] : 1'b0;
    end

endmodule
