// Quarter-rate retimer: four data flip-flops and a clock-gated multiplexer.
//
// The quarter-rate synchronizers never clock anything at the bit rate. Four
// flip-flops D1..D4 sample the data on the rising edges of CF, CQ, COF and
// COQ, which come one bit apart, so each flip-flop takes every fourth bit.
// A multiplexer of AND gates picks, for each bit interval, the flip-flop
// that sampled at the start of that interval, and an OR joins them into Zi:
//   Z1 = Q1 & CF  & COQ   (after CF rises)
//   Z2 = Q2 & CF  & CQ    (after CQ rises)
//   Z3 = Q3 & CQ  & COF   (after COF rises)
//   Z4 = Q4 & COF & COQ   (after COQ rises)
// Zi is therefore the data sampled at every bit boundary of the recovered
// clock, the same retimed stream a single bit-rate flip-flop would give.
// The flip-flop/clock pairing and the one-interval windows follow the
// published waveforms; the choice of which two clock levels open each
// AND gate is this design's.
//
// Timing: all clocks are sample-clock levels. A rising edge of a quarter
// clock seen in sample n loads its flip-flop at the end of sample n, and
// the window gates use the clock levels registered at the same instant, so
// Zi changes one sample after the edge, free of glitches. Zi therefore
// still shows the previous bit during the sample in which the edge is
// seen; a second retimer fed with Zi picks up that previous bit, which is
// how the automatic quarter-rate comparator delays Zi by one bit.
module quarter_retimer
  import sync_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      d,
  input  quad_clk_t quad,
  output logic [3:0] q,      // q[0] = Q1 .. q[3] = Q4
  output logic      zi
);

  quad_clk_t prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev <= quad;
      q    <= '0;
    end else begin
      prev <= quad;
      if (quad.cf  && !prev.cf)  q[0] <= d;
      if (quad.cq  && !prev.cq)  q[1] <= d;
      if (quad.cof && !prev.cof) q[2] <= d;
      if (quad.coq && !prev.coq) q[3] <= d;
    end
  end

  logic [3:0] z;
  always_comb begin
    z[0] = q[0] & prev.cf  & prev.coq;
    z[1] = q[1] & prev.cf  & prev.cq;
    z[2] = q[2] & prev.cq  & prev.cof;
    z[3] = q[3] & prev.cof & prev.coq;
    zi   = |z;
  end

endmodule
