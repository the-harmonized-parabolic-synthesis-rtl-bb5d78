// tb_hps_log2_full: the log2 unit at its default configuration (8-bit
// exponent, combinational datapath) over every one of the 2^14 mantissas,
// each with a different exponent from -128 to 127. Each result must equal
// the bit-exact reference, and over the whole sweep the error of the
// fractional part against log2(1+x) must reproduce the published maximum
// absolute error (1.5897615e-5) and RMS error (4.737692e-6).
module tb_hps_log2_full;
  import hps_pkg::*;
  import hps_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b1;
  logic              iv, ov;
  logic signed [7:0] e, oi;
  x_t                m;
  y_t                of;
  int checks = 0, failures = 0;

  hps_log2 dut (.clk(clk), .rst_n(rst_n), .in_valid(iv), .in_exp(e), .in_mant(m),
                .out_valid(ov), .out_int(oi), .out_frac(of));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    real err, maxabs = 0.0, sumsq = 0.0, rms;
    iv = 1'b1;
    for (int unsigned v = 0; v < 16384; v++) begin
      int ex;
      ex = int'(v % 256) - 128;
      e = 8'(ex);
      m = x_t'(v);
      #1;
      check(ov == 1'b1, "valid");
      check(int'(oi) == ex, $sformatf("integer part %0d != %0d", oi, ex));
      check(of == y_t'(ref_y(v)), $sformatf("m=%0d got %0d exp %0d", v, of, ref_y(v)));
      err = real'(of) / 131072.0 - log2_1px(v);
      if (err > maxabs) maxabs = err;
      if (-err > maxabs) maxabs = -err;
      sumsq += err * err;
    end
    rms = $sqrt(sumsq / 16384.0);
    $display("max abs error %.12f, rms error %.12f", maxabs, rms);
    check(maxabs > 1.5897e-5 && maxabs < 1.5898e-5, "max abs error");
    check(rms > 4.7376e-6 && rms < 4.7378e-6, "rms error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
