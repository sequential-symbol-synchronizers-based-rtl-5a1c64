// Testbench for ka_amp: every error value -2..+2 (half units) must give
// Ka * Pe with Ka = 0.08, in Q8.24, to within one LSB.
module tb_ka_amp;
  import sync_pkg::*;
  err_t pe;
  logic signed [31:0] y;
  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  ka_amp dut (.pe(pe), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = -2; e <= 2; e++) begin
      real expect_r;
      pe = err_t'(e);
      #1;
      expect_r = 0.08 * (real'(e) / 2.0) * 16777216.0;
      checks++;
      if (fabs(real'(y) - expect_r) > 1.0) begin
        failures++;
        $display("pe=%0d y=%0d expected %f", e, y, expect_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
