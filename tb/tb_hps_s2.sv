// tb_hps_s2: exhaustive check of the second sub-function over all 8 intervals
// and all 2048 values of x_w, for the combinational block and for the
// pipelined variant, whose result must appear exactly one clock after its
// inputs. Expected values come from the reference model of hps_ref_pkg.
module tb_hps_s2;
  import hps_pkg::*;
  import hps_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  idx_t idx;
  xw_t  xw;
  sq_t  xw_sq;
  s2_t  s2_c, s2_p;
  int   checks = 0, failures = 0;

  hps_s2 dut_c (.clk(clk), .idx(idx), .xw(xw), .xw_sq(xw_sq), .s2_frac(s2_c));
  hps_s2 #(.PIPELINED(1'b1)) dut_p (.clk(clk), .idx(idx), .xw(xw), .xw_sq(xw_sq), .s2_frac(s2_p));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic s2_t expect_frac(int unsigned x);
    return s2_t'(ref_s2(x) - 131072);
  endfunction

  initial begin
    int unsigned prev_x;
    bit have_prev = 1'b0;
    for (int unsigned x = 0; x < 16384; x++) begin
      @(negedge clk);
      // pipelined output now shows the input applied one clock earlier
      if (have_prev) begin
        checks++;
        if (s2_p != expect_frac(prev_x)) begin
          failures++;
          if (failures < 10) $display("FAIL pipe x=%0d got %0d expected %0d", prev_x, s2_p, expect_frac(prev_x));
        end
      end
      idx   = idx_t'(x >> 11);
      xw    = xw_t'(x);
      xw_sq = sq_t'(ref_sq(x & 2047));
      #1;
      checks++;
      if (s2_c != expect_frac(x)) begin
        failures++;
        if (failures < 10) $display("FAIL comb x=%0d got %0d expected %0d", x, s2_c, expect_frac(x));
      end
      // s2 must stay inside [1, 1.5)
      checks++;
      if (ref_s2(x) < 131072 || ref_s2(x) >= 196608) begin
        failures++;
        $display("FAIL reference s2 out of range at x=%0d", x);
      end
      prev_x    = x;
      have_prev = 1'b1;
    end
    @(negedge clk);
    checks++;
    if (s2_p != expect_frac(prev_x)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
