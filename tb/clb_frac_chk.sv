// clb_frac_chk: stimulus generator and reference model for a fracturable
// hybrid CLB, shared by the CLB and top-level testbenches.
//
// Same scheme as clb_nonfrac_chk: random configuration per trial, random
// cluster inputs each cycle on the falling edge, comparison of all 2*N_BLE
// outputs with a model computed from the configuration, model registers
// updated at the rising edge when ce is high. The model of the Dual MUX4
// and of the fracturable 6-LUT is written from their specification, not
// from the RTL. ev[] counts: 0 Dual MUX4 output with ground gating in use,
// 1 fractured LUT (two 5-LUTs), 2 whole 6-LUT, 3 registered output,
// 4 bypassed output, 5 feedback pin, 6 register held by ce = 0,
// 7 register loaded.
module clb_frac_chk
  import fpga_pkg::*;
#(
  parameter int unsigned N_IN     = I_FRAC,
  parameter int unsigned N_BLE    = N_BLE_DEF,
  parameter int unsigned N_MUX4   = N_MUX4_DEF,
  parameter int unsigned K        = K_FRAC,
  parameter int unsigned N_TRIALS = 20,
  parameter int unsigned CYC      = 16,
  parameter int unsigned N_SRC    = N_IN + O_FRAC * N_BLE,
  parameter int unsigned SW       = $clog2(xbar_cands(N_SRC) + 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            ce,
  output logic [N_IN-1:0]                 clb_in,
  output logic [N_BLE-1:0][FLE_CFG_W-1:0] cfg_le,
  output logic [N_BLE-1:0][O_FRAC-1:0]    cfg_reg,
  output logic [N_BLE*K-1:0][SW-1:0]      cfg_xbar,
  input  logic [O_FRAC*N_BLE-1:0]         clb_out,
  output logic                            done,
  output int                              checks,
  output int                              failures,
  output int                              ev [8]
);

  localparam int unsigned NC = xbar_cands(N_SRC);
  localparam int unsigned NO = O_FRAC * N_BLE;

  logic [NO-1:0] q_ref, le_ref, out_ref;

  function automatic logic pin_val(int unsigned p);
    int unsigned k = cfg_xbar[p];
    int unsigned s = 2 * k + (p % 2);
    if (k >= NC || s >= N_SRC) return 1'b0;
    if (s < N_IN) return clb_in[s];
    return cfg_reg[(s - N_IN) / 2][(s - N_IN) % 2] ? q_ref[s - N_IN] : out_ref[s - N_IN];
  endfunction

  // Dual MUX4 reference: {inv_a, gnd_b, inv_b} in bits [11:0].
  function automatic logic [1:0] dual_ref(logic [7:0] x, logic [11:0] c);
    logic [3:0] da, db;
    da = x[3:0] ^ c[11:8];
    db = (x[3:0] & ~c[7:4]) ^ c[3:0];
    return {db[x[7:6]], da[x[5:4]]};
  endfunction

  // fracturable 6-LUT reference: c[64] = fracture, c[63:0] = truth table.
  function automatic logic [1:0] flut_ref(logic [7:0] x, logic [64:0] c);
    if (!c[64]) return {c[32 + int'(x[4:0])], c[x[5:0]]};
    return {c[32 + int'({x[7:5], x[1:0]})], c[x[4:0]]};
  endfunction

  task automatic evaluate();
    for (int unsigned b = 0; b < N_BLE; b++) begin
      logic [K-1:0] x;
      logic [1:0]   o;
      for (int unsigned i = 0; i < K; i++) x[i] = pin_val(b * K + i);
      o = (b < N_MUX4) ? dual_ref(x, cfg_le[b][11:0]) : flut_ref(x, cfg_le[b]);
      for (int unsigned j = 0; j < O_FRAC; j++) begin
        le_ref[2*b+j]  = o[j];
        out_ref[2*b+j] = cfg_reg[b][j] ? q_ref[2*b+j] : o[j];
      end
    end
  endtask

  task automatic new_config();
    for (int unsigned b = 0; b < N_BLE; b++) begin
      cfg_reg[b] = 2'($urandom);
      cfg_le[b]  = {1'($urandom), $urandom, $urandom};
    end
    for (int unsigned b = 0; b < N_BLE; b++)
      for (int unsigned i = 0; i < K; i++) begin
        int unsigned p = b * K + i;
        int unsigned k = $urandom % (NC + 1);
        int unsigned s = 2 * k + (p % 2);
        if (k < NC && s < N_SRC && s >= N_IN) begin
          int unsigned o = s - N_IN;
          if (!(cfg_reg[o/2][o%2] || o/2 < b)) k = NC;
        end
        cfg_xbar[p] = SW'(k);
      end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    foreach (ev[i]) ev[i] = 0;
    q_ref = '0; clb_in = '0; cfg_le = '0; cfg_reg = '0; cfg_xbar = '0;
    wait (rst_n === 1'b1);
    for (int t = 0; t < N_TRIALS; t++) begin
      @(negedge clk);
      new_config();
      for (int unsigned p = 0; p < N_BLE * K; p++) begin
        automatic int unsigned k = cfg_xbar[p];
        if (k < NC && 2 * k + (p % 2) < N_SRC && 2 * k + (p % 2) >= N_IN) ev[5]++;
      end
      for (int c = 0; c < CYC; c++) begin
        if (c != 0) @(negedge clk);
        clb_in = {$urandom, $urandom, $urandom};
        #1;
        evaluate();
        for (int unsigned b = 0; b < N_BLE; b++) begin
          if (b < N_MUX4 && cfg_le[b][7:4] != 0) ev[0]++;
          if (b >= N_MUX4) begin
            if (cfg_le[b][64]) ev[1]++; else ev[2]++;
          end
          for (int unsigned j = 0; j < O_FRAC; j++) begin
            checks++;
            if (clb_out[2*b+j] !== out_ref[2*b+j]) begin
              failures++;
              if (failures < 10)
                $display("clb_frac_chk(N_MUX4=%0d): trial %0d cycle %0d BLE %0d out%0d=%b expected %b",
                         N_MUX4, t, c, b, j, clb_out[2*b+j], out_ref[2*b+j]);
            end
            if (cfg_reg[b][j]) ev[3]++; else ev[4]++;
          end
        end
        @(posedge clk);
        if (ce) begin q_ref = le_ref; ev[7]++; end
        else if (cfg_reg != 0) ev[6]++;
      end
    end
    done = 1'b1;
  end

endmodule
