// Phase comparator of the synchronizer operating by positive transitions
// at quarter rate, automatic version (p-a/4).
//
// A first quarter-rate retimer turns the data DD into Zi. A second,
// identical bank of four flip-flops and multiplexer, on the same four
// quarter clocks, retimes Zi itself: each of its flip-flops samples Zi at
// the edge where the first bank is about to change, so its output Zi2 is
// Zi delayed by exactly one bit. Then
//   Pvp = DD and not Zi    high from a rising DD edge to the next bit edge
//                          (T/2 wide at lock);
//   Pfp = Zi and not Zi2   high for one whole bit after a rising Zi edge;
// and Pfp is halved (the resistive divider, Pfh = Pfp/2) before the
// subtraction: Pe = Pvp - Pfp/2. Pe never vanishes, but at lock the
// positive area (T/2 at height 1) equals the negative one (T at height
// 1/2). The second bank, the one-bit-wide fixed pulse and the halving
// follow the document; treating the second bank's data path delay as zero
// is this design's reading.
//
// Interface: dd and the quarter clocks are sample-clock levels; pe is
// signed half units: 2*Pvp - Pfp, so -1, 0, +1 or +2.
module pc_pa4
  import sync_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      dd,
  input  quad_clk_t quad,
  output logic      dr,
  output logic      pv,
  output logic      pf,
  output err_t      pe
);

  logic [3:0] q1_unused, q2_unused;
  logic       zi2;

  quarter_retimer u_bank1 (
    .clk(clk), .rst_n(rst_n), .d(dd), .quad(quad), .q(q1_unused), .zi(dr)
  );

  quarter_retimer u_bank2 (
    .clk(clk), .rst_n(rst_n), .d(dr), .quad(quad), .q(q2_unused), .zi(zi2)
  );

  always_comb begin
    pv = dd & ~dr;
    pf = dr & ~zi2;
    pe = err_t'(2 * int'(pv) - int'(pf));
  end

endmodule
