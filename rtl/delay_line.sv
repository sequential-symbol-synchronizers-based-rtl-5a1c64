// Fixed delay line: the "delta-t = T/2" element of the manual phase
// comparators.
//
// The manual synchronizers build their fixed reference pulse from the data
// and a copy of the data delayed by half a bit. Here the delay is a shift
// register of DELAY sample-clock stages, so q(n) = d(n - DELAY). With the
// default of 1000 samples per bit, DELAY = 500 is T/2. The delay being a
// parameter stands in for the manual adjustment of the original circuit.
//
// Interface: d in, q out, both one bit. Synchronous active-low reset clears
// the line to zero. Latency is exactly DELAY sample clocks.
module delay_line #(
  parameter int unsigned DELAY = 500
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [DELAY-1:0] line;

  always_ff @(posedge clk) begin
    if (!rst_n) line <= '0;
    else        line <= (line << 1) | DELAY'(d);
  end

  assign q = line[DELAY-1];

endmodule
