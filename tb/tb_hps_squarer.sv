// tb_hps_squarer: exhaustive check of the folded squarer at the log2 design's
// widths (11-bit operand, 9 kept bits) and at a small odd size (5 in, 7 out)
// against floor(a^2 / 2^(2*IN_W - OUT_W)).
module tb_hps_squarer;
  logic [10:0] a;
  logic [8:0]  sq;
  logic [4:0]  b;
  logic [6:0]  sqb;
  int checks = 0, failures = 0;

  hps_squarer dut (.a(a), .sq(sq));
  hps_squarer #(.IN_W(5), .OUT_W(7)) dut_small (.a(b), .sq(sqb));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned v = 0; v < 2048; v++) begin
      a = 11'(v);
      b = 5'(v);
      #1;
      checks++;
      if (int'(sq) != int'((v * v) >> 13)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d got %0d expected %0d", v, sq, (v * v) >> 13);
      end
      if (v < 32) begin
        checks++;
        if (int'(sqb) != int'((v * v) >> 3)) begin
          failures++;
          $display("FAIL small b=%0d got %0d expected %0d", v, sqb, (v * v) >> 3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
