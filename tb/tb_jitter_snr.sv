// Jitter against SNR for the four synchronizers (the comparison workload).
//
// A behavioural channel stands in for the analog test set-up: NRZ data of
// amplitude Aef = 0.5 plus white Gaussian noise of variance sigma^2 per
// sample, the noise low-passed to a noise bandwidth Bn = 5 Hz (first-order,
// corner 2*Bn/pi), and the sum sliced at zero into the logic input dd.
// With 1000 samples per bit, SNR = Aef^2 / (No * Bn), No = 2 sigma^2 / 1000,
// so sigma^2 = 25 / SNR. The Gaussian samples are sums of twelve uniform
// numbers. For each SNR the design runs WARM bits to settle and then
// MEASURE bits, and the RMS of the meter samples around their mean gives
// the jitter in UI for each variant.
// Checks: with the highest SNR every variant holds lock with under
// 0.02 UI RMS; every variant's jitter at the lowest SNR exceeds its jitter
// at the highest; every meter delivers one sample per bit; at the lowest
// SNR each manual version has less jitter than the automatic one of the
// same variant.
module tb_jitter_snr;
  import sync_pkg::*;
  localparam int SPB     = 1000;
  localparam int WARM    = 150;
  localparam int MEASURE = 1000;
  localparam int NSNR    = 8;
  localparam real SNRS[NSNR] = '{1.0, 2.0, 4.0, 8.0, 12.0, 16.0, 25.0, 40.0};
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, dd = 0, cke = 0;
  logic [3:0] ckr, dr, jv;
  err_t [3:0] pe;
  logic signed [3:0][15:0] jitter;
  int checks = 0, failures = 0;

  sync_top dut (.clk(clk), .rst_n(rst_n), .dd(dd), .cke(cke), .ckr(ckr), .dr(dr),
                .pe(pe), .jitter(jitter), .jitter_valid(jv));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NSNR * (WARM + MEASURE + 5) * SPB) @(posedge clk);
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

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  real rms[NSNR][4];

  initial begin
    real sigma, a, nf, r, cur;
    real s1[4], s2[4];
    int  n[4];
    int  ph;
    a  = 2.0 * PI * (2.0 * 5.0 / PI) / real'(SPB);   // noise filter coefficient
    nf = 0.0;
    cur = 0.5;
    for (int p = 0; p < NSNR; p++) begin
      sigma = $sqrt(25.0 / SNRS[p]);
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int i = 0; i < 4; i++) begin s1[i] = 0.0; s2[i] = 0.0; n[i] = 0; end
      for (int t = 0; t < (WARM + MEASURE) * SPB; t++) begin
        ph = t + SPB / 2;                           // receiver starts near lock
        if (ph % SPB == 0) cur = ($urandom_range(0, 1) == 1) ? 0.5 : -0.5;
        nf += a * (sigma * gauss() - nf);
        r   = cur + nf;
        dd  = (r > 0.0);
        cke = (ph % SPB) < SPB / 2;
        @(negedge clk);
        for (int i = 0; i < 4; i++) begin
          if (jv[i] && t >= WARM * SPB) begin
            real j;
            j = real'($signed(jitter[i])) / real'(SPB);
            s1[i] += j; s2[i] += j * j; n[i]++;
          end
        end
      end
      for (int i = 0; i < 4; i++) begin
        real mean;
        mean = s1[i] / n[i];
        rms[p][i] = $sqrt(s2[i] / n[i] - mean * mean);
        check(n[i] >= MEASURE - 2 && n[i] <= MEASURE + 1, $sformatf("meter %0d samples %0d", i, n[i]));
      end
      $display("SNR %5.1f  jitter UI RMS  b-m %7.4f  b-a %7.4f  p-m/4 %7.4f  p-a/4 %7.4f",
               SNRS[p], rms[p][0], rms[p][1], rms[p][2], rms[p][3]);
    end
    for (int i = 0; i < 4; i++) begin
      check(rms[NSNR-1][i] < 0.02, $sformatf("variant %0d jitter at SNR %0.0f: %f", i, SNRS[NSNR-1], rms[NSNR-1][i]));
      check(rms[0][i] > rms[NSNR-1][i], $sformatf("variant %0d jitter falls with SNR", i));
    end
    // at the lowest SNR each manual version beats its automatic counterpart
    check(rms[0][0] < rms[0][1], "b-m better than b-a at the lowest SNR");
    check(rms[0][2] < rms[0][3], "p-m/4 better than p-a/4 at the lowest SNR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
