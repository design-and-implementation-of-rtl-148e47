// tb_xbar: checks the 50% depopulated crossbar at the nonfracturable
// cluster size (50 sources, 60 pins). For every pin it walks all select
// codes, including the ones that name no source, with random source values,
// and compares the pin with source 2k + (p mod 2) or with 0. It also checks
// that each pin can reach exactly half of the sources.
module tb_xbar;
  localparam int N_SRC = 50, N_DST = 60, NC = 25, SW = 5;
  logic [N_SRC-1:0]         src;
  logic [N_DST-1:0][SW-1:0] sel;
  logic [N_DST-1:0]         dst;
  int checks = 0, failures = 0;

  xbar #(.N_SRC(N_SRC), .N_DST(N_DST)) dut (.src, .sel, .dst);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < (1 << SW); k++) begin
        src = {$urandom, $urandom};
        for (int p = 0; p < N_DST; p++) sel[p] = SW'(k);
        #1;
        for (int p = 0; p < N_DST; p++) begin
          logic exp;
          automatic int s = 2 * k + (p % 2);
          exp = (k < NC && s < N_SRC) ? src[s] : 1'b0;
          checks++;
          if (dst[p] !== exp) begin
            failures++;
            if (failures < 10) $display("pin %0d sel %0d: %b expected %b", p, k, dst[p], exp);
          end
        end
      end
    // reachability: a pin sees a one-hot source exactly for one code when
    // the source has the pin's parity, never otherwise
    for (int s = 0; s < N_SRC; s++) begin
      int hits [2];
      hits[0] = 0; hits[1] = 0;
      src = '0; src[s] = 1'b1;
      for (int k = 0; k < (1 << SW); k++) begin
        for (int p = 0; p < N_DST; p++) sel[p] = SW'(k);
        #1;
        hits[0] += int'(dst[0]);
        hits[1] += int'(dst[1]);
      end
      checks++;
      if (hits[s % 2] != 1 || hits[1 - s % 2] != 0) begin
        failures++;
        $display("source %0d reached %0d/%0d times by pins 0/1", s, hits[0], hits[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
