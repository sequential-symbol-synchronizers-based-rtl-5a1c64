// Testbench for symbol_sync: the closed loop, all four variants at once on
// the same clean random data (1000 samples per bit, transitions DOFF
// samples into each emitter bit). The VCO starts 0.2 UI late. Checked:
//  - the phase error decays as a first-order loop: expected rate
//    Ka * (transition density) * Ko/(2*pi) per second, that is a time
//    constant of 25 bits for the both-transition variants (density 1/2)
//    and 50 bits for the positive-transition variants (density 1/4);
//  - after lock the clock rises mid-bit (within 0.03 UI on average) and
//    the retimed data equals the transmitted data, one bit late;
//  - the clock keeps the bit rate: 1000 samples per bit on average.
module tb_symbol_sync;
  import sync_pkg::*;
  localparam int SPB   = 1000;
  localparam int DOFF  = 300;
  localparam int NBITS = 500;
  logic clk = 0, rst_n = 0, dd = 0;
  logic [3:0] ck, dr, ck_prev;
  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  for (genvar i = 0; i < 4; i++) begin : g_dut
    quad_clk_t quad;
    logic pv, pf;
    err_t pe;
    symbol_sync #(.VARIANT(variant_e'(i))) dut (
      .clk(clk), .rst_n(rst_n), .dd(dd), .ck(ck[i]), .quad(quad),
      .dr(dr[i]), .pv(pv), .pf(pf), .pe(pe));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((NBITS + 20) * SPB) @(posedge clk);
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

  bit   bits[NBITS];
  real  err_at[4][NBITS];       // clock lateness in UI at each bit, per variant
  int   edges[4], first_edge[4], last_edge[4], data_ok[4], data_bad[4];

  initial begin
    real tau_expect, e0, e1, ratio, sum;
    int n;
    for (int b = 0; b < NBITS; b++) bits[b] = 1'($urandom_range(0, 1));
    for (int i = 0; i < 4; i++) begin
      edges[i] = 0; data_ok[i] = 0; data_bad[i] = 0;
      for (int b = 0; b < NBITS; b++) err_at[i][b] = 0.0;
    end
    dd = bits[0];
    repeat (2) @(negedge clk);
    rst_n = 1;
    ck_prev = ck;
    for (int t = 0; t < NBITS * SPB; t++) begin
      int b;
      b = (t >= DOFF) ? (t - DOFF) / SPB + 1 : 0;
      dd = bits[(b < NBITS) ? b : NBITS - 1];
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        if (ck[i] && !ck_prev[i] && t > DOFF) begin
          int pos, bi;
          pos = (t - DOFF) % SPB;
          bi  = (t - DOFF) / SPB;
          err_at[i][bi] = real'(pos - SPB / 2) / real'(SPB);
          if (edges[i] == 0) first_edge[i] = t;
          last_edge[i] = t;
          edges[i]++;
        end
        // retimed data, checked mid-way between clock edges after lock
        if (t > 300 * SPB && (t - DOFF) % SPB == SPB - 50) begin
          if (dr[i] == bits[(t - DOFF) / SPB + 1]) data_ok[i]++;
          else data_bad[i]++;
        end
      end
      ck_prev = ck;
    end
    for (int i = 0; i < 4; i++) begin
      tau_expect = (i < 2) ? 25.0 : 50.0;
      // average error around bit 2..6 and around bit tau..tau+4
      e0 = 0.0; e1 = 0.0;
      for (int b = 1; b < 5; b++) e0 += err_at[i][b] / 4.0;
      for (int b = 0; b < 4; b++) e1 += err_at[i][int'(tau_expect) + 1 + b] / 4.0;
      ratio = e1 / e0;
      $display("variant %0d: error %f UI at start, %f after %0.0f bits (ratio %f, first-order 0.37)",
               i, e0, e1, tau_expect, ratio);
      check(e0 > 0.15, $sformatf("variant %0d starts late", i));
      check(ratio > 0.2 && ratio < 0.55, $sformatf("variant %0d decay ratio %f", i, ratio));
      sum = 0.0; n = 0;
      for (int b = 350; b < NBITS - 2; b++) begin sum += err_at[i][b]; n++; end
      $display("variant %0d: mean lateness after lock %f UI", i, sum / n);
      check(fabs(sum / n) < 0.03, $sformatf("variant %0d locked mid-bit", i));
      check(data_bad[i] == 0 && data_ok[i] > 100, $sformatf("variant %0d retimed data ok=%0d bad=%0d", i, data_ok[i], data_bad[i]));
      check(fabs(real'(last_edge[i] - first_edge[i]) / real'(edges[i] - 1) - SPB) < 2.0,
            $sformatf("variant %0d bit rate", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
