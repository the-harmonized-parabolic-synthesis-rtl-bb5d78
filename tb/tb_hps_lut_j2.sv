// tb_hps_lut_j2: checks every entry of the j2 coefficient table against the
// decimal coefficient values of the log2 design, scaled to the table's
// fixed-point grid (2^-15).
module tb_hps_lut_j2;
  import hps_pkg::*;
  import hps_ref_pkg::*;

  idx_t idx;
  logic [31:0] dout;
  int checks = 0, failures = 0;

  hps_lut_j2 dut (.idx(idx), .j2_mag(dout[J_W-1:0]));
  assign dout[31:J_W] = '0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      longint unsigned exp_v;
      idx = idx_t'(i);
      #1;
      exp_v = to_grid(-J_DEC[i], 15);
      checks++;
      if (longint'(dout) != exp_v) begin
        failures++;
        $display("FAIL idx=%0d got %0d expected %0d", i, dout, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
