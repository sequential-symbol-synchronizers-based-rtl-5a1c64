// Amplification factor Ka of the synchronizer loop.
//
// The phase comparator gives the error pulse Pe in half units (err = 2*Pe,
// -2..+2). This block multiplies it by the loop gain factor Ka and returns
// Ka*Pe as a signed Q8.24 number, the unit the loop filter and the VCO
// work in. Ka = 0.08 is the value the document derives for sequential
// synchronizers, so that Ka*Kf*Ko/4 = 0.02 Hz loop noise bandwidth with
// Kf = 1/(2*pi) and Ko = 2*pi. The fixed-point format is this design's.
// Purely combinational.
module ka_amp
  import sync_pkg::*;
#(
  parameter real KA = 0.08
) (
  input  err_t               pe,
  output logic signed [31:0] y
);

  // Ka in Q8.24 per half unit of error: Ka * 2^24 / 2.
  localparam int KA_HALF = int'(KA * 8388608.0);

  assign y = 32'(pe) * KA_HALF;

endmodule
