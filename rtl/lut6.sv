// lut6: K-input lookup table (K = 6 by default).
//
// The LUT is a bank of 2^K configuration SRAM bits feeding a 2^K-to-1
// multiplexer whose select lines are the K logic inputs, so it realises any
// K-input Boolean function: out = cfg[in]. It is purely combinational; the
// delay is the same whatever function is stored. Structure and the default
// K = 6 follow the architecture description; the configuration bits are a
// plain input port here (how they are loaded is outside this block).
module lut6 #(
  parameter int unsigned K = 6
) (
  input  logic [K-1:0]      in,   // logic inputs, in[0] is the LSB of the address
  input  logic [(1<<K)-1:0] cfg,  // truth table, cfg[a] = f(a)
  output logic              out
);

  always_comb out = cfg[in];

endmodule
