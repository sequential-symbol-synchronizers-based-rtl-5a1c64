// Voltage-controlled oscillator of the synchronizer loop, as a numerically
// controlled oscillator on the sample clock.
//
// A phase accumulator of PHASE_W+2 bits advances every sample by the
// nominal step of one bit period (2^PHASE_W / SAMPLES_PER_BIT) plus the
// frequency correction from the loop filter. The low PHASE_W bits are the
// phase within a bit; the two bits above them count bits modulo four.
//   ck   : bit-rate clock, high in the first half of each bit period, so it
//          rises where the low PHASE_W bits wrap.
//   quad : quarter-rate clocks CF (high in bits 0,1 of 4), CQ (CF delayed by
//          90 degrees = one bit), COF = not CF and COQ = not CQ. Their rising
//          edges coincide with rising edges of ck, in the order CF, CQ,
//          COF, COQ.
// The VCO gain is Ko = 2*pi rad/s per unit of control, i.e. 1 Hz per unit:
// ctrl is a frequency offset in Hz (at 1 baud) in signed Q8.24, and the
// accumulator step is (1 + ctrl) * 2^PHASE_W / SAMPLES_PER_BIT.
// Outputs come straight from the accumulator register: a new control value
// moves the phase in the next sample. Reset puts the phase at zero.
// Ko = 2*pi and the 1 Hz centre frequency follow the document's normalised
// loop; the accumulator realisation and its width are this design's.
module vco
  import sync_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_BIT = 1000,
  parameter int unsigned PHASE_W         = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [31:0]       ctrl,
  output logic                     ck,
  output quad_clk_t                quad,
  output logic [PHASE_W+1:0]       phase
);

  localparam longint NOM_INC  = ((64'sd1 <<< PHASE_W) + 64'(SAMPLES_PER_BIT / 2)) / 64'(SAMPLES_PER_BIT);
  // Ko/(2*pi) * delta-tau * 2^PHASE_W: accumulator steps per Hz of offset.
  localparam longint KO_STEP  = NOM_INC;

  logic signed [63:0] delta;
  logic [PHASE_W+1:0] inc;

  always_comb begin
    delta = (64'(ctrl) * KO_STEP) >>> 24;
    inc   = (PHASE_W+2)'(NOM_INC + delta);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + inc;
  end

  always_comb begin
    ck       = ~phase[PHASE_W-1];
    quad.cf  = ~phase[PHASE_W+1];
    quad.cq  = phase[PHASE_W+1] ^ phase[PHASE_W];
    quad.cof = phase[PHASE_W+1];
    quad.coq = ~(phase[PHASE_W+1] ^ phase[PHASE_W]);
  end

endmodule
