// Loop filter F(s) of the synchronizer.
//
// The document's first-order loop uses F(s) = 1 inside the loop band and a
// cutoff at 0.5 Hz, 25 times the 0.02 Hz loop bandwidth, only to remove
// the high-frequency content of the error pulses. This block is that
// first-order low-pass, discretised at the sample rate:
//   y(n+1) = y(n) + alpha * (x(n) - y(n)),  alpha = 2*pi*FC_HZ / SAMPLES_PER_BIT
// with alpha in Q0.16 (206 at the defaults). DC gain is one. x and y are
// signed Q8.24; the output is the filter register, so x reaches y one
// sample later. Reset clears the state.
module loop_filter #(
  parameter int unsigned SAMPLES_PER_BIT = 1000,
  parameter real         FC_HZ           = 0.5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [31:0] x,
  output logic signed [31:0] y
);

  localparam real PI    = 3.14159265358979;
  localparam int  ALPHA = int'(2.0 * PI * FC_HZ / real'(SAMPLES_PER_BIT) * 65536.0);

  logic signed [47:0] prod;
  logic signed [31:0] step;

  always_comb begin
    prod = (48'(x) - 48'(y)) * 48'(ALPHA);
    step = 32'(prod >>> 16);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= y + step;
  end

endmodule
