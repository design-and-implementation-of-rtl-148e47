// tb_mux4_le: exhaustive check of the MUX4 logic element (all 64 input
// values under all 16 inversion settings) against out = d[sel], with
// d[i] = in[i] xor inv[i]. It then maps three functions onto the element
// the way a technology mapper would and checks them over all inputs:
// a 2-input XOR (truth-table constants on the data pins), the 3-input
// majority function (Shannon cofactors on the data pins) and a 6-input
// 4:1 multiplexer with inverted data inputs. Finally every 2-input and
// every 3-input function is mapped by Shannon expansion and checked.
module tb_mux4_le;
  import fpga_pkg::*;
  logic [5:0] in;
  mux4_cfg_t  inv;
  logic       out;
  int checks = 0, failures = 0;

  mux4_le dut (.in(in), .cfg_inv(inv), .out(out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      if (failures < 10) $display("%s: in=%b inv=%b out=%b expected %b", what, in, inv, out, exp);
    end
  endtask

  initial begin
    // exhaustive
    for (int c = 0; c < 16; c++)
      for (int a = 0; a < 64; a++) begin
        logic [3:0] d;
        inv = 4'(c);
        in  = 6'(a);
        #1;
        d = in[3:0] ^ inv;
        expect_eq(d[in[5:4]], "exhaustive");
      end
    // f(a,b) = a ^ b: a, b on the selects, data = truth table {0,1,1,0};
    // constant 1 is constant 0 inverted.
    inv = 4'b0110;
    for (int a = 0; a < 4; a++) begin
      in = {2'(a), 4'b0000};
      #1;
      expect_eq(in[5] ^ in[4], "xor2");
    end
    // maj(a,b,c): selects a,b; cofactors 0, c, c, 1 on the data inputs.
    inv = 4'b1000;
    for (int a = 0; a < 8; a++) begin
      logic x, y, z;
      {x, y, z} = 3'(a);
      in = {x, y, 1'b0, z, z, 1'b0};
      #1;
      expect_eq((x & y) | (x & z) | (y & z), "maj3");
    end
    // 6-input function: 4:1 mux of inverted data
    inv = 4'b1111;
    for (int a = 0; a < 64; a++) begin
      in = 6'(a);
      #1;
      expect_eq(~in[in[5:4]], "mux4_inverted");
    end
    // every 2-input function f(a,b): a, b on the selects, each data input
    // tied to logic 0 and its inversion bit set to the truth-table value
    for (int f = 0; f < 16; f++) begin
      inv = 4'(f);
      for (int a = 0; a < 4; a++) begin
        in = {2'(a), 4'b0000};
        #1;
        expect_eq(f[a], "all_2input");
      end
    end
    // every 3-input function f(a,b,c), truth-table index {a,b,c}: a, b on
    // the selects; the cofactor over c for select value i is 0, 1, c or ~c,
    // realised as data 0 or c with the inversion bit as needed
    for (int f = 0; f < 256; f++) begin
      logic [3:0] use_c;
      for (int i = 0; i < 4; i++) begin
        logic [1:0] cof;
        cof = 2'(f >> (2 * i));            // {f(c=1), f(c=0)}
        use_c[i] = cof[1] ^ cof[0];         // depends on c
        inv[i]   = cof[0];                  // value at c = 0
      end
      for (int v = 0; v < 8; v++) begin
        logic a, b, c;
        {a, b, c} = 3'(v);
        for (int i = 0; i < 4; i++) in[i] = use_c[i] & c;
        in[5:4] = {a, b};
        #1;
        expect_eq(f[v], "all_3input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
