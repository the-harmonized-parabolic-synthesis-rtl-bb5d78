// tb_hps_log2: end-to-end test of the floating-point log2 unit.
// Two units are driven: the default combinational one and one with the two
// pipeline stages enabled. Random operands 2^e * 1.m with signed exponents
// are applied; every result must equal e + y_ref(m) exactly and lie within
// 2^-15.9 of the true log2(2^e * 1.m). The pipelined unit gets random valid
// gaps and must deliver each result exactly 2 clocks after its operand.
// Counted mechanisms (each must occur): every one of the 8 interpolation
// intervals, negative / zero / positive exponents, mantissa 1.0 exactly,
// pipeline bubbles, back-to-back operands in the pipeline.
module tb_hps_log2;
  import hps_pkg::*;
  import hps_ref_pkg::*;

  localparam int unsigned EW = 8;
  localparam int N = 6000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                 iv_c, iv_p, ov_c, ov_p;
  logic signed [EW-1:0] e_c, e_p, oi_c, oi_p;
  x_t                   m_c, m_p;
  y_t                   of_c, of_p;
  int checks = 0, failures = 0;

  int interval_hits [8];
  int neg_exp = 0, zero_exp = 0, pos_exp = 0, mant_one = 0, bubbles = 0, back2back = 0;

  hps_log2 dut_c (.clk(clk), .rst_n(rst_n), .in_valid(iv_c), .in_exp(e_c), .in_mant(m_c),
                  .out_valid(ov_c), .out_int(oi_c), .out_frac(of_c));
  hps_log2 #(.EXP_W(EW), .PIPELINED(1'b1)) dut_p (.clk(clk), .rst_n(rst_n), .in_valid(iv_p),
                  .in_exp(e_p), .in_mant(m_p), .out_valid(ov_p), .out_int(oi_p), .out_frac(of_p));

  initial begin
    repeat (50000) @(posedge clk);
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

  // check one result against the reference and the true logarithm
  task automatic check_result(string tag, int e, int unsigned m,
                              logic signed [EW-1:0] oi, y_t of);
    real got, truth;
    check(int'(oi) == e, $sformatf("%s int e=%0d got %0d", tag, e, oi));
    check(of == y_t'(ref_y(m)), $sformatf("%s frac m=%0d got %0d exp %0d", tag, m, of, ref_y(m)));
    got   = real'(oi) + real'(of) / 131072.0;
    truth = real'(e) + log2_1px(m);
    check((got - truth) < 1.6e-5 && (truth - got) < 1.6e-5,
          $sformatf("%s accuracy e=%0d m=%0d err=%g", tag, e, m, got - truth));
  endtask

  function automatic int rand_exp();
    int r;
    r = int'($urandom % 256) - 128;
    if (($urandom % 8) == 0) r = 0;
    return r;
  endfunction

  function automatic int unsigned rand_mant();
    if (($urandom % 64) == 0) return 0;
    if (($urandom % 64) == 0) return 16383;
    return $urandom % 16384;
  endfunction

  initial begin
    int          hist_e [2];
    int unsigned hist_m [2];
    bit          hist_v [2];
    int          results, sent;
    bit          prev_v;
    rst_n = 1'b0;
    iv_c = 1'b0; iv_p = 1'b0;
    e_c = '0; e_p = '0; m_c = '0; m_p = '0;
    hist_v = '{default: 1'b0};
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(ov_p == 1'b0, "no valid output during reset");
    rst_n = 1'b1;

    // combinational unit
    for (int k = 0; k < N; k++) begin
      int e;
      int unsigned m;
      e = rand_exp();
      m = rand_mant();
      e_c = EW'(e);
      m_c = x_t'(m);
      iv_c = 1'b1;
      #1;
      check(ov_c == 1'b1, "comb valid");
      check_result("comb", e, m, oi_c, of_c);
      interval_hits[m >> 11]++;
      if (e < 0) neg_exp++; else if (e == 0) zero_exp++; else pos_exp++;
      if (m == 0) mant_one++;
    end
    iv_c = 1'b0;

    // pipelined unit
    results = 0;
    sent = 0;
    prev_v = 1'b0;
    while (results < N) begin
      @(negedge clk);
      check(ov_p == hist_v[1], "pipe valid timing");
      if (hist_v[1]) begin
        check_result("pipe", hist_e[1], hist_m[1], oi_p, of_p);
        results++;
      end
      hist_e[1] = hist_e[0]; hist_m[1] = hist_m[0]; hist_v[1] = hist_v[0];
      iv_p = (sent < N) && (($urandom % 3) != 0);
      e_p  = EW'(rand_exp());
      m_p  = x_t'(rand_mant());
      if (iv_p) begin
        sent++;
        if (prev_v) back2back++;
      end else if (sent < N) begin
        bubbles++;
      end
      prev_v    = iv_p;
      hist_e[0] = int'(e_p);
      hist_m[0] = m_p;
      hist_v[0] = iv_p;
    end

    for (int i = 0; i < 8; i++) begin
      $display("interval %0d hit %0d times", i, interval_hits[i]);
      check(interval_hits[i] > 0, $sformatf("interval %0d never used", i));
    end
    $display("exponents: negative %0d zero %0d positive %0d; mantissa 1.0: %0d",
             neg_exp, zero_exp, pos_exp, mant_one);
    $display("pipeline: bubbles %0d back-to-back %0d", bubbles, back2back);
    check(neg_exp > 0, "negative exponent never used");
    check(zero_exp > 0, "zero exponent never used");
    check(pos_exp > 0, "positive exponent never used");
    check(mant_one > 0, "mantissa 1.0 never used");
    check(bubbles > 0, "no pipeline bubble");
    check(back2back > 0, "no back-to-back operands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
