// tb_lut6: checks the K-input lookup table. For 200 random truth tables it
// applies all 2^K input combinations of a 6-LUT and compares the output with
// the addressed truth-table bit; a 3-input instance is checked the same way.
module tb_lut6;
  logic [5:0]  in6;
  logic [63:0] cfg6;
  logic        out6;
  logic [2:0]  in3;
  logic [7:0]  cfg3;
  logic        out3;
  int checks = 0, failures = 0;

  lut6           dut6 (.in(in6), .cfg(cfg6), .out(out6));
  lut6 #(.K(3))  dut3 (.in(in3), .cfg(cfg3), .out(out3));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      cfg6 = {$urandom, $urandom};
      cfg3 = 8'($urandom);
      for (int a = 0; a < 64; a++) begin
        logic [63:0] sh;
        in6 = 6'(a);
        in3 = 3'(a);
        #1;
        sh = cfg6 >> a;
        checks++;
        if (out6 !== sh[0]) begin
          failures++;
          if (failures < 10) $display("6-LUT: cfg=%h in=%0d out=%b", cfg6, a, out6);
        end
        if (a < 8) begin
          checks++;
          if (out3 !== ((cfg3 >> a) & 8'd1) != 0) begin
            failures++;
            if (failures < 10) $display("3-LUT: cfg=%h in=%0d out=%b", cfg3, a, out3);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
