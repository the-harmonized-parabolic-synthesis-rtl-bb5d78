// tb_hps_log2_core: checks the processing core over all 2^14 operands.
//  * combinational core: y must equal the bit-exact reference, and the error
//    against log2(1+x) must match the published error statistics (maximum
//    absolute error 1.5897615e-5, RMS 4.737692e-6, mean and median near 0);
//  * pipelined core: fed with random valid gaps, every valid result must
//    appear exactly 2 clocks after its operand, with the same value, and no
//    out_valid may appear without an operand.
module tb_hps_log2_core;
  import hps_pkg::*;
  import hps_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic in_valid, in_valid_p;
  x_t   x, xp;
  logic ov_c, ov_p;
  y_t   y_c, y_p;
  int   checks = 0, failures = 0;

  hps_log2_core dut_c (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                       .out_valid(ov_c), .y(y_c));
  hps_log2_core #(.PIPELINED(1'b1)) dut_p (.clk(clk), .rst_n(rst_n), .in_valid(in_valid_p),
                       .x(xp), .out_valid(ov_p), .y(y_p));

  initial begin
    repeat (100000) @(posedge clk);
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

  // ---------------- combinational core, error statistics ----------------
  real err [16384];

  task automatic run_comb();
    real e, maxabs = 0.0, sum = 0.0, sumsq = 0.0, mean, sd, rms, med;
    real sorted [$];
    for (int unsigned v = 0; v < 16384; v++) begin
      x = x_t'(v);
      in_valid = 1'b1;
      #1;
      check(y_c == y_t'(ref_y(v)), $sformatf("comb x=%0d y=%0d exp=%0d", v, y_c, ref_y(v)));
      check(ov_c == 1'b1, "comb out_valid");
      e = real'(y_c) / 131072.0 - log2_1px(v);
      err[v] = e;
      if (e > maxabs) maxabs = e;
      if (-e > maxabs) maxabs = -e;
      sum += e;
      sumsq += e * e;
      sorted.push_back(e);
    end
    in_valid = 1'b0;
    #1;
    check(ov_c == 1'b0, "comb out_valid follows in_valid");
    sorted.sort();
    med   = (sorted[8191] + sorted[8192]) / 2.0;
    mean  = sum / 16384.0;
    rms   = $sqrt(sumsq / 16384.0);
    sd    = $sqrt(sumsq / 16384.0 - mean * mean);
    $display("error: max abs %.12f mean %.12f median %.12f std %.12f rms %.12f",
             maxabs, mean, med, sd, rms);
    check(maxabs < 1.59e-5 && maxabs > 1.589e-5, "max abs error 1.5897615e-5");
    check(maxabs < 2.0 ** -15.0, "better than 15 bits");
    check(rms > 4.7376e-6 && rms < 4.7378e-6, "rms 4.737692e-6");
    check(mean > -1.0e-7 && mean < 1.0e-7, "mean near zero");
    check(med > -1.0e-7 && med < 1.0e-7, "median near zero");
    check((sd - rms) < 1.0e-9 && (rms - sd) < 1.0e-9, "std equals rms");
  endtask

  // ---------------- pipelined core, latency and throughput ----------------
  task automatic run_pipe();
    int unsigned hist_x [3];
    bit          hist_v [3];
    int          results = 0, sent = 0, cycle = 0;
    int unsigned v = 0;
    hist_v = '{default: 1'b0};
    while (results < 16384) begin
      @(negedge clk);
      // outputs now belong to the operand applied 2 clocks ago
      check(ov_p == hist_v[1], $sformatf("pipe valid at cycle %0d", cycle));
      if (hist_v[1]) begin
        check(y_p == y_t'(ref_y(hist_x[1])),
              $sformatf("pipe x=%0d y=%0d exp=%0d", hist_x[1], y_p, ref_y(hist_x[1])));
        results++;
      end
      hist_x[1] = hist_x[0];
      hist_v[1] = hist_v[0];
      in_valid_p = (v < 16384) && (($urandom % 4) != 0);
      xp = x_t'($urandom);
      if (in_valid_p) begin
        xp = x_t'(v);
        v++;
        sent++;
      end
      hist_x[0] = xp;
      hist_v[0] = in_valid_p;
      cycle++;
    end
    check(sent == 16384, "all operands sent");
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_valid_p = 1'b0;
    x = '0;
    xp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(ov_p == 1'b0, "pipe valid low after reset");
    rst_n = 1'b1;
    run_comb();
    run_pipe();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
