// Testbench for quarter_retimer: quarter clocks made from a bit counter
// (8 samples per bit here), data changing at random samples. Checked every
// sample: Zi is the data taken at the most recent bit boundary, and the
// flip-flop of the current quarter holds that same value; the four
// flip-flops are taken in the order CF, CQ, COF, COQ.
module tb_quarter_retimer;
  import sync_pkg::*;
  localparam int SPB = 8;
  logic clk = 0, rst_n = 0, d = 0, zi;
  logic [3:0] q;
  quad_clk_t quad;
  int checks = 0, failures = 0;
  int t = 0;
  int cur_quarter, prev_quarter;
  logic exp_zi;
  bit   have_exp = 0;

  quarter_retimer dut (.clk(clk), .rst_n(rst_n), .d(d), .quad(quad), .q(q), .zi(zi));

  always #5 clk = ~clk;

  function automatic quad_clk_t clocks(int k);
    quad_clk_t c;
    c.cf  = (k == 0 || k == 1);
    c.cq  = (k == 1 || k == 2);
    c.cof = !c.cf;
    c.coq = !c.cq;
    return c;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur_quarter = 3;
    quad = clocks(3);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      // outputs after the previous posedge
      if (have_exp) begin
        checks += 2;
        if (zi !== exp_zi) begin
          failures++;
          if (failures < 10) $display("n=%0d zi=%b exp=%b", n, zi, exp_zi);
        end
        if (q[cur_quarter] !== exp_zi) begin
          failures++;
          if (failures < 10) $display("n=%0d q[%0d]=%b exp=%b", n, cur_quarter, q[cur_quarter], exp_zi);
        end
      end
      // new inputs for the next posedge
      prev_quarter = cur_quarter;
      t++;
      cur_quarter = (t / SPB) % 4;
      quad = clocks(cur_quarter);
      if ($urandom_range(0, 4) == 0) d = ~d;
      if (cur_quarter != prev_quarter) begin
        exp_zi   = d;
        have_exp = 1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
