// Testbench for pc_ba (both transitions, bit rate, automatic).
// Random NRZ data changes at bit starts (1000 samples per bit); the clock
// is an ideal square wave whose rising edge sits OFFSET samples after the
// data transitions. Each sample DR, Pv and Pfa are compared with a model:
// DR is the data at the latest clock rise, Q1 is DR at the latest clock
// fall, Pfa = DR xor Q1. Then the error area per transition is checked:
// about zero with the clock mid-bit, +2*(OFFSET-500) samples (half units)
// when late, negative when early.
module tb_pc_ba;
  import sync_pkg::*;
  localparam int SPB = 1000;
  logic clk = 0, rst_n = 0, dd = 0, ck = 0, dr, pv, pf;
  err_t pe;
  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  pc_ba dut (.clk(clk), .rst_n(rst_n), .dd(dd), .ck(ck), .dr(dr), .pv(pv), .pf(pf), .pe(pe));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int offset, int nbits);
    int t;
    longint area = 0;
    int transitions = 0;
    logic exp_dr = 0;
    logic exp_q1 = 0;
    logic last_ck_level;
    bit bits[$];
    logic cur, prev_bit;
    int last_trans = -100000;
    real per_trans, expect_pt;
    rst_n = 0;
    dd = 0; ck = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_bit = 0;
    last_ck_level = 0;
    for (t = 0; t < nbits * SPB; t++) begin
      // drive data and clock for this sample
      if (t % SPB == 0) begin
        cur = (t >= 4 * SPB && t < (nbits - 4) * SPB) ? 1'($urandom_range(0, 1)) : 1'b0;
        if (cur != prev_bit) begin
          last_trans = t;
          if (t >= 4 * SPB) transitions++;
        end
        prev_bit = cur;
      end
      dd = cur;
      ck = (((t - offset) % SPB + SPB) % SPB) < SPB / 2;
      #1;
      // combinational outputs against the model for this sample
      if (t >= 2 * SPB) begin
        checks += 3;
        if (dr !== exp_dr) begin failures++; if (failures < 10) $display("t=%0d dr=%b exp=%b", t, dr, exp_dr); end
        if (pv !== (dd ^ exp_dr)) begin failures++; if (failures < 10) $display("t=%0d pv", t); end
        if (pf !== (exp_dr ^ exp_q1)) begin failures++; if (failures < 10) $display("t=%0d pf=%b", t, pf); end
        if (pe !== err_t'(2 * (int'(pv) - int'(pf)))) failures++;
        checks++;
        if (t >= 4 * SPB) area += longint'(pe);
      end
      // model: DR takes the data at a clock rise, visible from the next sample
      @(negedge clk);
      if (!ck && last_ck_level) exp_q1 = exp_dr;
      if (ck && !last_ck_level) exp_dr = dd;
      last_ck_level = ck;
    end
    per_trans = real'(area) / real'(transitions);
    expect_pt = 2.0 * real'(offset - SPB / 2);
    checks++;
    if (transitions < 10 || fabs(per_trans - expect_pt) > 4.0) begin
      failures++;
      $display("offset %0d: error area per transition %f, expected %f", offset, per_trans, expect_pt);
    end
  endtask

  initial begin
    run(500, 120);
    run(800, 120);
    run(250, 120);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
