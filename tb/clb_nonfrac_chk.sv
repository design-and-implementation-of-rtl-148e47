// clb_nonfrac_chk: stimulus generator and reference model for a
// nonfracturable hybrid CLB, shared by the CLB and top-level testbenches.
//
// For each of N_TRIALS trials it draws a random configuration (truth tables,
// MUX4 inversion bits, register-bypass bits, crossbar selects), then for
// CYC cycles drives random cluster inputs on the falling clock edge and
// compares every cluster output, one time unit later, with a reference
// model evaluated from the configuration alone. The model keeps its own copy
// of each BLE register and updates it at the rising edge when ce is high.
// Feedback is drawn only from registered BLE outputs or from lower-numbered
// BLEs, so the configured netlist is acyclic. Counts of each exercised
// mechanism are reported in ev[] (see the EV_* indices).
module clb_nonfrac_chk
  import fpga_pkg::*;
#(
  parameter int unsigned N_IN     = I_NONFRAC,
  parameter int unsigned N_BLE    = N_BLE_DEF,
  parameter int unsigned N_MUX4   = N_MUX4_DEF,
  parameter int unsigned K        = K_NONFRAC,
  parameter int unsigned N_TRIALS = 20,
  parameter int unsigned CYC      = 16,
  parameter int unsigned N_SRC    = N_IN + N_BLE,
  parameter int unsigned SW       = $clog2(xbar_cands(N_SRC) + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           ce,
  output logic [N_IN-1:0]                clb_in,
  output logic [N_BLE-1:0][LE_CFG_W-1:0] cfg_le,
  output logic [N_BLE-1:0]               cfg_reg,
  output logic [N_BLE*K-1:0][SW-1:0]     cfg_xbar,
  input  logic [N_BLE-1:0]               clb_out,
  output logic                           done,
  output int                             checks,
  output int                             failures,
  output int                             ev [8]
);

  // event indices: 0 MUX4 output checked with inversion in use, 1 LUT output
  // checked, 2 registered output, 3 bypassed output, 4 feedback pin,
  // 5 constant-0 pin, 6 register held by ce = 0, 7 register loaded
  localparam int unsigned NC = xbar_cands(N_SRC);

  logic [N_BLE-1:0] q_ref;
  logic [N_BLE-1:0] le_ref;
  logic [N_BLE-1:0] out_ref;

  function automatic logic pin_val(int unsigned p, int unsigned b);
    int unsigned k = cfg_xbar[p];
    int unsigned s = 2 * k + (p % 2);
    if (k >= NC || s >= N_SRC) return 1'b0;
    if (s < N_IN) return clb_in[s];
    return cfg_reg[s - N_IN] ? q_ref[s - N_IN] : out_ref[s - N_IN];
  endfunction

  task automatic evaluate();
    for (int unsigned b = 0; b < N_BLE; b++) begin
      logic [K-1:0] x;
      for (int unsigned i = 0; i < K; i++) x[i] = pin_val(b * K + i, b);
      if (b < N_MUX4) begin
        logic [3:0] d;
        d = x[3:0] ^ cfg_le[b][3:0];
        le_ref[b] = d[x[5:4]];
      end else begin
        le_ref[b] = cfg_le[b][x];
      end
      out_ref[b] = cfg_reg[b] ? q_ref[b] : le_ref[b];
    end
  endtask

  task automatic new_config();
    for (int unsigned b = 0; b < N_BLE; b++) begin
      cfg_reg[b] = 1'($urandom);
      cfg_le[b]  = {$urandom, $urandom};
    end
    for (int unsigned b = 0; b < N_BLE; b++)
      for (int unsigned i = 0; i < K; i++) begin
        int unsigned p = b * K + i;
        int unsigned k = $urandom % (NC + 1);
        int unsigned s = 2 * k + (p % 2);
        if (k < NC && s < N_SRC && s >= N_IN) begin
          int unsigned j = s - N_IN;
          if (!(cfg_reg[j] || j < b)) k = NC;
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
        if (k >= NC || 2 * k + (p % 2) >= N_SRC) ev[5]++;
        else if (2 * k + (p % 2) >= N_IN) ev[4]++;
      end
      for (int c = 0; c < CYC; c++) begin
        if (c != 0) @(negedge clk);
        clb_in = {$urandom, $urandom};
        #1;
        evaluate();
        for (int unsigned b = 0; b < N_BLE; b++) begin
          checks++;
          if (clb_out[b] !== out_ref[b]) begin
            failures++;
            if (failures < 10)
              $display("clb_nonfrac_chk(N_MUX4=%0d): trial %0d cycle %0d BLE %0d out=%b expected %b",
                       N_MUX4, t, c, b, clb_out[b], out_ref[b]);
          end
          if (b < N_MUX4 && cfg_le[b][3:0] != 0) ev[0]++;
          if (b >= N_MUX4) ev[1]++;
          if (cfg_reg[b]) ev[2]++; else ev[3]++;
        end
        @(posedge clk);
        if (ce) begin q_ref = le_ref; ev[7]++; end
        else if (cfg_reg != 0) ev[6]++;
      end
    end
    done = 1'b1;
  end

endmodule
