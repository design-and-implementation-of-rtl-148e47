// fpga_pkg: constants and configuration-memory types shared by the hybrid
// LUT/MUX4 logic blocks.
//
// The architectural numbers (6-input nonfracturable BLEs, 8-input two-output
// fracturable BLEs, ten BLEs per CLB, 40 or 80 CLB inputs, a 50% populated
// local crossbar, a 4:6 MUX4:LUT mix) follow the architecture description.
// The bit layouts of the configuration words are this implementation's own.
package fpga_pkg;

  // ---- cluster geometry -------------------------------------------------
  localparam int unsigned N_BLE_DEF    = 10; // BLEs per CLB
  localparam int unsigned K_NONFRAC    = 6;  // inputs of a nonfracturable LE
  localparam int unsigned I_NONFRAC    = 40; // CLB inputs, nonfracturable
  localparam int unsigned K_FRAC       = 8;  // inputs of a fracturable LE
  localparam int unsigned O_FRAC       = 2;  // outputs of a fracturable LE
  localparam int unsigned I_FRAC       = 80; // CLB inputs, fracturable
  localparam int unsigned N_MUX4_DEF   = 4;  // MUX4 BLEs per CLB (4:6 mix)

  // ---- logic-element configuration words --------------------------------
  // MUX4: one SRAM bit per data input, 1 = feed the inverted input.
  typedef logic [3:0] mux4_cfg_t;

  // Dual MUX4: upper MUX4 (A) inverts, lower MUX4 (B) gates each shared
  // data input to ground, then inverts.
  typedef struct packed {
    logic [3:0] inv_a;  // inversion bits of MUX4 A
    logic [3:0] gnd_b;  // 1 = MUX4 B data input i takes logic 0
    logic [3:0] inv_b;  // inversion bits of MUX4 B
  } dual_mux4_cfg_t;

  // Fracturable 6-LUT: 64 truth-table bits, split into two 32-bit halves
  // when 'frac' is set.
  typedef struct packed {
    logic        frac;  // 0 = one 6-LUT, 1 = two 5-LUTs
    logic [63:0] tt;    // tt[31:0] = half A, tt[63:32] = half B
  } frac_lut_cfg_t;

  // Width of a nonfracturable LE configuration word: a 6-LUT needs 64 bits,
  // a MUX4 uses only the low 4.
  localparam int unsigned LE_CFG_W      = 64;
  // Width of a fracturable LE configuration word (frac LUT is the larger).
  localparam int unsigned FLE_CFG_W     = $bits(frac_lut_cfg_t);

  // ---- crossbar ----------------------------------------------------------
  // A 50% populated crossbar: each LE input pin reaches every other source.
  function automatic int unsigned xbar_cands(int unsigned n_src);
    return (n_src + 1) / 2;
  endfunction

endpackage
