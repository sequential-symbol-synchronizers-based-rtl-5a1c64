// Testbench for vco: with zero control the bit clock must rise every 1000
// samples and the quarter clocks must rise in the order CF, CQ, COF, COQ,
// one bit apart, each on a bit-clock edge. With a control of +0.08 Hz and
// -0.08 Hz (Ko = 2*pi rad/s per unit) the average period must become
// 1000/1.08 and 1000/0.92 samples.
module tb_vco;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, ck;
  logic signed [31:0] ctrl = 0;
  quad_clk_t quad, quad_prev;
  logic ck_prev;
  logic [33:0] phase;
  int checks = 0, failures = 0;

  vco dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .ck(ck), .quad(quad), .phase(phase));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // measures the average ck period over nbits rising edges, in samples
  task automatic measure(int nbits, output real period, output int order_err);
    int t = 0, first = -1, last = -1, edges = 0;
    int expect_next = -1;
    order_err = 0;
    while (edges <= nbits) begin
      ck_prev = ck;
      quad_prev = quad;
      @(negedge clk);
      t++;
      if (ck && !ck_prev) begin
        int k;
        if (first < 0) first = t;
        last = t;
        edges++;
        // exactly one quarter clock rises with ck, and in rotation
        k = -1;
        if (quad.cf  && !quad_prev.cf)  k = 0;
        if (quad.cq  && !quad_prev.cq)  k = (k < 0) ? 1 : 9;
        if (quad.cof && !quad_prev.cof) k = (k < 0) ? 2 : 9;
        if (quad.coq && !quad_prev.coq) k = (k < 0) ? 3 : 9;
        if (k < 0 || k == 9) order_err++;
        else begin
          if (expect_next >= 0 && k != expect_next) order_err++;
          expect_next = (k + 1) % 4;
        end
      end else if ((quad.cf && !quad_prev.cf) || (quad.cq && !quad_prev.cq) ||
                   (quad.cof && !quad_prev.cof) || (quad.coq && !quad_prev.coq)) begin
        order_err++;
      end
    end
    period = real'(last - first) / real'(nbits);
  endtask

  initial begin
    real p;
    int oe;
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(20, p, oe);
    check(p > 999.5 && p < 1000.5, $sformatf("nominal period %f", p));
    check(oe == 0, $sformatf("quarter clock order errors %0d", oe));
    ctrl = 32'sd1342177;   // 0.08 in Q8.24
    measure(40, p, oe);
    check(p > 1000.0 / 1.08 - 0.5 && p < 1000.0 / 1.08 + 0.5, $sformatf("fast period %f", p));
    check(oe == 0, $sformatf("quarter clock order errors %0d", oe));
    ctrl = -32'sd1342177;
    measure(40, p, oe);
    check(p > 1000.0 / 0.92 - 0.5 && p < 1000.0 / 0.92 + 0.5, $sformatf("slow period %f", p));
    check(oe == 0, $sformatf("quarter clock order errors %0d", oe));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
