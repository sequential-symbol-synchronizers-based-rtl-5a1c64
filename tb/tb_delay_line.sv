// Testbench for delay_line: random data through the default 500-stage line;
// every output sample must equal the input of exactly DELAY samples before
// (zero before that, from reset), tracked with an independent history.
module tb_delay_line;
  localparam int unsigned DELAY = 500;
  logic clk = 0, rst_n = 0, d = 0, q;
  int checks = 0, failures = 0;
  bit hist[$];

  delay_line #(.DELAY(DELAY)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DELAY; i++) hist.push_back(1'b0);
    for (int n = 0; n < 5000; n++) begin
      // q shows the input pushed DELAY clocks ago
      if (q !== hist[0]) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d q=%b exp=%b", n, q, hist[0]);
      end
      checks++;
      d = (n % 97 < 40) ? 1'($urandom_range(0, 1)) : ((n / 7) % 2 == 1);
      void'(hist.pop_front());
      hist.push_back(d);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
