// End-to-end testbench for sync_top at its default parameters (1000
// samples per bit, Ka = 0.08, 0.5 Hz filter): all four synchronizers with
// their jitter meters on one random data stream and its emitter clock.
// Phase 1: the recovered clocks start out of phase and must lock (meter
// mean within 0.03 UI of zero). Phase 2: the emitter jumps 0.25 UI earlier;
// the meters must first see the jump and the loops must pull back to zero.
// Throughout, after lock, the retimed data must equal the transmitted
// bits. Counted mechanisms, each of which must occur: positive and
// negative error pulses in every variant, the half-weight fixed pulse of
// the automatic quarter-rate comparator (error -1/2 alone), jitter samples
// from every meter, lock and re-lock of every variant.
module tb_sync_top;
  import sync_pkg::*;
  localparam int SPB    = 1000;
  localparam int NBITS1 = 400;
  localparam int NBITS2 = 400;
  localparam int STEP   = 250;
  logic clk = 0, rst_n = 0, dd = 0, cke = 0;
  logic [3:0] ckr, dr, jv;
  err_t [3:0] pe;
  logic signed [3:0][15:0] jitter;
  int checks = 0, failures = 0;

  sync_top dut (.clk(clk), .rst_n(rst_n), .dd(dd), .cke(cke), .ckr(ckr), .dr(dr),
                .pe(pe), .jitter(jitter), .jitter_valid(jv));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((NBITS1 + NBITS2 + 10) * SPB) @(posedge clk);
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

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int pos_pulses[4], neg_pulses[4], half_pulses, meter_samples[4];
  int locks[4], relocks[4], step_seen[4], data_ok[4], data_bad[4];
  real jsum[4];
  int  jn[4];
  bit  bits[$];

  initial begin
    int t, ph, bit_idx, shift;
    for (int i = 0; i < 4; i++) begin
      pos_pulses[i] = 0; neg_pulses[i] = 0; meter_samples[i] = 0;
      locks[i] = 0; relocks[i] = 0; step_seen[i] = 0; data_ok[i] = 0; data_bad[i] = 0;
    end
    half_pulses = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    shift = 0;
    for (t = 0; t < (NBITS1 + NBITS2) * SPB; t++) begin
      if (t == NBITS1 * SPB) shift = -STEP;     // emitter jumps 0.25 UI earlier
      ph = t - 700 - shift;                     // receiver starts 0.2 UI off lock
      bit_idx = (ph >= 0) ? ph / SPB : 0;
      while (bits.size() <= bit_idx) bits.push_back(1'($urandom_range(0, 1)));
      dd  = bits[bit_idx];
      cke = (ph >= 0) && ((ph % SPB) < SPB / 2);
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        if (pe[i] > 0) pos_pulses[i]++;
        if (pe[i] < 0) neg_pulses[i]++;
        if (i == 3 && pe[i] == -1) half_pulses++;
        if (jv[i]) begin
          meter_samples[i]++;
          // windows: locked before the jump, the jump itself, locked again
          if (t > 300 * SPB && t < NBITS1 * SPB) begin jsum[i] += $signed(jitter[i]); jn[i]++; end
          if (t > NBITS1 * SPB + 2 * SPB && t < NBITS1 * SPB + 5 * SPB &&
              int'($signed(jitter[i])) < -STEP / 2) step_seen[i]++;
          if (t > (NBITS1 + 300) * SPB) begin jsum[i] += $signed(jitter[i]); jn[i]++; end
        end
        // retimed data checked late in each bit, away from lock transients
        if (((t > 300 * SPB && t < NBITS1 * SPB) || t > (NBITS1 + 300) * SPB) &&
            ph >= SPB && (ph % SPB) == SPB - 50) begin
          if (dr[i] == bits[bit_idx]) data_ok[i]++;
          else data_bad[i]++;
        end
      end
      if (t == NBITS1 * SPB - 1 || t == (NBITS1 + NBITS2) * SPB - 1) begin
        for (int i = 0; i < 4; i++) begin
          real m;
          m = (jn[i] > 0) ? jsum[i] / jn[i] / SPB : 1.0;
          $display("t=%0d variant %0d mean jitter %f UI over %0d samples", t, i, m, jn[i]);
          if (fabs(m) < 0.03) begin
            if (t < NBITS1 * SPB) locks[i]++;
            else relocks[i]++;
          end
          jsum[i] = 0.0; jn[i] = 0;
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      $display("variant %0d: +pulses %0d -pulses %0d meter %0d lock %0d step %0d relock %0d data ok %0d bad %0d",
               i, pos_pulses[i], neg_pulses[i], meter_samples[i], locks[i], step_seen[i], relocks[i],
               data_ok[i], data_bad[i]);
      check(pos_pulses[i] > 0, $sformatf("variant %0d positive error pulses", i));
      check(neg_pulses[i] > 0, $sformatf("variant %0d negative error pulses", i));
      check(meter_samples[i] >= NBITS1 + NBITS2 - 2, $sformatf("variant %0d meter samples", i));
      check(locks[i] == 1, $sformatf("variant %0d lock", i));
      check(step_seen[i] > 0, $sformatf("variant %0d phase jump seen", i));
      check(relocks[i] == 1, $sformatf("variant %0d re-lock", i));
      check(data_bad[i] == 0 && data_ok[i] > 150, $sformatf("variant %0d retimed data", i));
    end
    $display("half-weight fixed pulses (p-a/4): %0d samples", half_pulses);
    check(half_pulses > 0, "half-weight fixed pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
