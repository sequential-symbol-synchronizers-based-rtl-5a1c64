// Jitter meter: phase of the recovered clock against the emitter clock.
//
// An RS flip-flop A is set by the recovered clock CKR and reset by the
// emitter clock CKE, so it is high from each CKR rising edge to the next
// CKE rising edge. An integrator counts the samples A is high; at every
// CKE rising edge a sample-and-hold takes the count (H) and the integrator
// restarts. H is the time from CKR to CKE as a fraction of the bit, and
// H - 0.5 is the phase deviation of CKR from the middle of the emitter
// bit: zero when the recovered clock samples exactly mid-bit. A series of
// these values is the jitter histogram; RMS and peak-to-peak are computed
// from it outside the meter. The RS flip-flop, integrator, sample-and-hold
// and 0.5 offset follow the document; edge-triggered set/reset (reset
// winning when both edges fall in one sample) and the counter realisation
// are this design's.
//
// Interface: ckr, cke are sample-clock levels. jitter is signed, in units
// of 1/SAMPLES_PER_BIT of a bit (UI); valid pulses for one sample when a
// new value is held, one sample after the CKE edge is seen.
module jitter_meter #(
  parameter int unsigned SAMPLES_PER_BIT = 1000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ckr,
  input  logic               cke,
  output logic signed [15:0] jitter,
  output logic               valid
);

  logic        ckr_prev, cke_prev;
  logic        a;
  logic [15:0] integ;

  wire set_a   = ckr && !ckr_prev;
  wire reset_a = cke && !cke_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ckr_prev <= ckr;
      cke_prev <= cke;
      a        <= 1'b0;
      integ    <= '0;
      jitter   <= '0;
      valid    <= 1'b0;
    end else begin
      ckr_prev <= ckr;
      cke_prev <= cke;
      valid    <= reset_a;
      if (reset_a) begin
        a      <= 1'b0;
        jitter <= $signed(integ + 16'(a)) - 16'(SAMPLES_PER_BIT / 2);
        integ  <= '0;
      end else begin
        if (set_a) a <= 1'b1;
        integ <= integ + 16'(a);
      end
    end
  end

endmodule
