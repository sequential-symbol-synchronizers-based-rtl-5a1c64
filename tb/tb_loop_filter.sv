// Testbench for loop_filter: step responses. A first-order low-pass with
// 0.5 Hz cutoff at 1000 samples per second must follow
// 1 - exp(-2*pi*0.5*n/1000); checked at many points and at the final value,
// for a positive and then a negative step.
module tb_loop_filter;
  logic clk = 0, rst_n = 0;
  logic signed [31:0] x = 0, y;
  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  localparam real ONE = 16777216.0;
  localparam real W   = 2.0 * 3.14159265358979 * 0.5 / 1000.0;

  loop_filter dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_test(real from, real to);
    x = $rtoi(to * ONE);
    for (int n = 1; n <= 6000; n++) begin
      @(negedge clk);
      if (n % 250 == 0) begin
        real expect_r = to + (from - to) * $exp(-W * n);
        checks++;
        if (fabs(real'(y) / ONE - expect_r) > 0.01) begin
          failures++;
          $display("n=%0d y=%f expected %f", n, real'(y) / ONE, expect_r);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    step_test(0.0, 1.0);
    step_test(1.0, -0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
