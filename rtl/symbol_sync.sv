// One complete pulse-comparison symbol synchronizer (a first-order PLL).
//
// The loop is: phase comparator -> amplification factor Ka -> loop filter
// F(s) -> VCO, whose clock closes the loop back into the comparator. The
// comparator compares a variable pulse, whose width follows the clock
// phase, with a fixed reference pulse; their difference Pe steers the VCO
// until the clock samples the data in the middle of each bit. VARIANT
// chooses the comparator, all other blocks being the same:
//   B_M  both transitions, bit rate, manual      (pc_bm, uses ck)
//   B_A  both transitions, bit rate, automatic   (pc_ba, uses ck)
//   P_M4 positive transitions, quarter rate, manual    (pc_pm4, uses quad)
//   P_A4 positive transitions, quarter rate, automatic (pc_pa4, uses quad)
// Loop numbers follow the document: Ka = 0.08, Ko = 2*pi rad/s per unit,
// Kf = 1/(2*pi), filter cutoff 0.5 Hz, all at 1 baud with 1000 samples per
// bit; the loop noise bandwidth Ka*Kf*Ko/4 is 0.02 Hz. The sample-clock
// realisation and fixed-point formats are this design's.
//
// Interface: dd is the received data as a sample-clock level. ck is the
// recovered bit-rate clock (it rises at the sampling instant), quad the
// four quarter-rate clocks, dr the retimed data, pv/pf/pe the comparator
// pulses (pe in half units). Latency from pe to a VCO phase change is two
// samples (filter and accumulator registers).
module symbol_sync
  import sync_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_BIT = 1000,
  parameter variant_e    VARIANT         = B_M,
  parameter real         KA              = 0.08,
  parameter real         FC_HZ           = 0.5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      dd,
  output logic      ck,
  output quad_clk_t quad,
  output logic      dr,
  output logic      pv,
  output logic      pf,
  output err_t      pe
);

  localparam int unsigned HALF_BIT = SAMPLES_PER_BIT / 2;

  logic signed [31:0] ka_out;
  logic signed [31:0] ctrl;
  logic [33:0]        phase_unused;

  generate
    case (VARIANT)
      B_M: begin : g_bm
        pc_bm #(.DELAY(HALF_BIT)) u_pc (
          .clk(clk), .rst_n(rst_n), .dd(dd), .ck(ck),
          .dr(dr), .pv(pv), .pf(pf), .pe(pe));
      end
      B_A: begin : g_ba
        pc_ba u_pc (
          .clk(clk), .rst_n(rst_n), .dd(dd), .ck(ck),
          .dr(dr), .pv(pv), .pf(pf), .pe(pe));
      end
      P_M4: begin : g_pm4
        pc_pm4 #(.DELAY(HALF_BIT)) u_pc (
          .clk(clk), .rst_n(rst_n), .dd(dd), .quad(quad),
          .dr(dr), .pv(pv), .pf(pf), .pe(pe));
      end
      default: begin : g_pa4
        pc_pa4 u_pc (
          .clk(clk), .rst_n(rst_n), .dd(dd), .quad(quad),
          .dr(dr), .pv(pv), .pf(pf), .pe(pe));
      end
    endcase
  endgenerate

  ka_amp #(.KA(KA)) u_ka (.pe(pe), .y(ka_out));

  loop_filter #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT), .FC_HZ(FC_HZ)) u_filter (
    .clk(clk), .rst_n(rst_n), .x(ka_out), .y(ctrl));

  vco #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT), .PHASE_W(32)) u_vco (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .ck(ck), .quad(quad), .phase(phase_unused));

endmodule
