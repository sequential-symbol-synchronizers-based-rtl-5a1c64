// Phase comparator of the synchronizer operating by both transitions at
// the bit rate, automatic version (b-a).
//
// The first D flip-flop retimes the data DD on the rising edge of CK into
// DR; the second flip-flop D1 takes DR on the falling edge of CK (the
// inverted clock) into Q1. The variable pulse Pv = DD xor DR runs from a
// data transition to the next rising CK edge; the fixed pulse
// Pfa = DR xor Q1 runs from that rising edge to the following falling edge,
// half a clock period, without any adjustment. Pe = Pv - Pfa never
// vanishes, but at lock (CK rising mid-bit) its positive and negative
// areas are equal, so its average is zero.
// Structure follows the document; the sample-clock realisation is this
// design's.
//
// Interface: dd and ck are sample-clock levels; pe is signed half units.
// DR and Q1 change one sample after the CK edge is seen.
module pc_ba
  import sync_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic dd,
  input  logic ck,
  output logic dr,
  output logic pv,
  output logic pf,
  output err_t pe
);

  logic ck_prev;
  logic q1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ck_prev <= ck;
      dr      <= 1'b0;
      q1      <= 1'b0;
    end else begin
      ck_prev <= ck;
      if (ck && !ck_prev) dr <= dd;
      if (!ck && ck_prev) q1 <= dr;
    end
  end

  always_comb begin
    pv = dd ^ dr;
    pf = dr ^ q1;
    pe = err_t'(2 * (int'(pv) - int'(pf)));
  end

endmodule
