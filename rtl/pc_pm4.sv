// Phase comparator of the synchronizer operating by positive transitions
// at quarter rate, manual version (p-m/4).
//
// The data DD is retimed by the quarter-rate retimer (four flip-flops on
// CF, CQ, COF, COQ plus multiplexer) into Zi. Only rising data transitions
// are used:
//   Pvp = DD and not Zi           high from a rising DD edge to the next
//                                 quarter-clock edge (bit boundary);
//   Pfp = DD and not DD(t - T/2)  high for T/2 after a rising DD edge,
//                                 the delay set in advance.
// Pe = Pvp - Pfp vanishes when the clock edges fall in the middle of the
// bit. The use of rising transitions only and the T/2 delay follow the
// document; writing the two pulses as "new level high, old level low" is
// this design's reading of "positive transitions".
//
// Interface: dd and the quarter clocks are sample-clock levels; pe is
// signed half units (-2, 0, +2).
module pc_pm4
  import sync_pkg::*;
#(
  parameter int unsigned DELAY = 500
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      dd,
  input  quad_clk_t quad,
  output logic      dr,
  output logic      pv,
  output logic      pf,
  output err_t      pe
);

  logic [3:0] q_unused;
  logic       dd_del;

  quarter_retimer u_retimer (
    .clk(clk), .rst_n(rst_n), .d(dd), .quad(quad), .q(q_unused), .zi(dr)
  );

  delay_line #(.DELAY(DELAY)) u_delay (
    .clk(clk), .rst_n(rst_n), .d(dd), .q(dd_del)
  );

  always_comb begin
    pv = dd & ~dr;
    pf = dd & ~dd_del;
    pe = err_t'(2 * (int'(pv) - int'(pf)));
  end

endmodule
