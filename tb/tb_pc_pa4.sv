// Testbench for pc_pa4 (positive transitions, quarter rate, automatic).
// Random NRZ data changes at bit starts (1000 samples per bit); ideal
// quarter clocks CF, CQ, COF, COQ step one bit apart, their edges OFFSET
// samples after the data transitions. Each sample Zi, Pvp, Pfp and Pe are
// compared with a model: Zi is the data at the latest quarter-clock edge,
// Zi2 is Zi one bit earlier, Pvp = DD and not Zi, Pfp = Zi and not Zi2,
// Pe = Pvp - Pfp/2 (half units: 2*Pvp - Pfp). The error area per rising
// transition must be about zero with the edges mid-bit (positive area T/2
// at height 1 against T at height 1/2) and +2*(OFFSET-500) otherwise.
module tb_pc_pa4;
  import sync_pkg::*;
  localparam int SPB = 1000;
  logic clk = 0, rst_n = 0, dd = 0, dr, pv, pf;
  quad_clk_t quad;
  err_t pe;
  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic quad_clk_t clocks(int k);
    quad_clk_t c;
    c.cf  = (k == 0 || k == 1);
    c.cq  = (k == 1 || k == 2);
    c.cof = !c.cf;
    c.coq = !c.cq;
    return c;
  endfunction

  pc_pa4 dut (.clk(clk), .rst_n(rst_n), .dd(dd), .quad(quad), .dr(dr), .pv(pv), .pf(pf), .pe(pe));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int offset, int nbits);
    longint area = 0;
    int rises = 0;
    logic exp_zi = 0;
    logic exp_zi2 = 0;
    int k, last_k;
    logic cur, prev_bit;
    int last_rise = -100000;
    real per_rise, expect_pr;
    rst_n = 0;
    dd = 0;
    quad = clocks(3);
    last_k = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_bit = 0;
    for (int t = 0; t < nbits * SPB; t++) begin
      if (t % SPB == 0) begin
        cur = (t >= 4 * SPB && t < (nbits - 4) * SPB) ? 1'($urandom_range(0, 1)) : 1'b0;
        if (cur && !prev_bit) begin
          last_rise = t;
          if (t >= 4 * SPB) rises++;
        end
        prev_bit = cur;
      end
      dd = cur;
      k = ((t + 4 * SPB - offset) / SPB) % 4;
      quad = clocks(k);
      #1;
      if (t >= 5 * SPB) begin
        checks += 4;
        if (dr !== exp_zi) begin failures++; if (failures < 10) $display("t=%0d zi=%b exp=%b", t, dr, exp_zi); end
        if (pv !== (dd & ~exp_zi)) begin failures++; if (failures < 10) $display("t=%0d pvp", t); end
        if (pf !== (exp_zi & ~exp_zi2)) begin failures++; if (failures < 10) $display("t=%0d pfp=%b", t, pf); end
        if (pe !== err_t'(2 * int'(pv) - int'(pf))) failures++;
      end
      if (t >= 2 * SPB) area += longint'(pe);
      @(negedge clk);
      if (k != last_k) begin
        exp_zi2 = exp_zi;
        exp_zi  = dd;
      end
      last_k = k;
    end
    per_rise = real'(area) / real'(rises);
    expect_pr = 2.0 * real'(offset - SPB / 2);
    checks++;
    if (rises < 10 || fabs(per_rise - expect_pr) > 4.0) begin
      failures++;
      $display("offset %0d: error area per rising edge %f, expected %f", offset, per_rise, expect_pr);
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
