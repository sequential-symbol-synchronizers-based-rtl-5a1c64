// Testbench for jitter_meter: CKE is an ideal 1000-sample square wave; CKR
// is a square wave of the same period whose rising edge sits a chosen
// number of samples after CKE's, changed every few bits (including cases
// next to the wrap-around). Each held value must equal (samples from the
// CKR rise to the next CKE rise) - 500, one value per CKE period.
module tb_jitter_meter;
  localparam int SPB = 1000;
  logic clk = 0, rst_n = 0, ckr = 0, cke = 0, valid;
  logic signed [15:0] jitter;
  int checks = 0, failures = 0;

  jitter_meter dut (.clk(clk), .rst_n(rst_n), .ckr(ckr), .cke(cke), .jitter(jitter), .valid(valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200 * SPB) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int offsets[] = '{500, 400, 650, 999, 1, 250, 731, 500};
  int valids = 0;

  initial begin
    int off, exp_j, periods;
    repeat (2) @(negedge clk);
    rst_n = 1;
    periods = 0;
    for (int s = 0; s < offsets.size(); s++) begin
      off = offsets[s];
      // CKR rises at (SPB - off) into each CKE period, so CKR->CKE is off samples
      for (int t = 0; t < 5 * SPB; t++) begin
        int ph;
        ph  = t % SPB;
        cke = ph < SPB / 2;
        ckr = ((ph - (SPB - off) + SPB) % SPB) < SPB / 2;
        @(negedge clk);
        if (valid) begin
          valids++;
          // the first held value of each setting may span the change
          if (t > 2 * SPB) begin
            exp_j = off - SPB / 2;
            checks++;
            if (jitter != 16'(exp_j)) begin
              failures++;
              $display("offset %0d: jitter %0d expected %0d", off, jitter, exp_j);
            end
          end
        end
      end
      periods += 5;
    end
    checks++;
    if (valids < periods - 1 || valids > periods) begin
      failures++;
      $display("valid strobes %0d for %0d periods", valids, periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
