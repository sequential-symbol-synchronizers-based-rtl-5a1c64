// Phase comparator of the synchronizer operating by both transitions at
// the bit rate, manual version (b-m).
//
// A D flip-flop retimes the data DD on each rising edge of the recovered
// clock CK, giving DR. The variable pulse Pv = DD xor DR is high from every
// data transition to the next rising CK edge, so its width tracks the clock
// phase. The fixed pulse Pf = DD xor DD(t - T/2) is high for exactly T/2
// after every transition, the delay being set in advance (the manual
// adjustment). The error Pe = Pv - Pf is zero when CK rises in the middle
// of the bit; a late clock gives positive error, an early one negative.
// Structure and equations follow the document; the sample-clock
// realisation is this design's.
//
// Interface: dd and ck are sample-clock levels; pe is signed half units
// (Pe = pe/2, so -2, 0 or +2 here). DR changes one sample after the CK
// edge is seen; pv, pf and pe are combinational from dd and registers.
module pc_bm
  import sync_pkg::*;
#(
  parameter int unsigned DELAY = 500
) (
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
  logic dd_del;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ck_prev <= ck;
      dr      <= 1'b0;
    end else begin
      ck_prev <= ck;
      if (ck && !ck_prev) dr <= dd;
    end
  end

  delay_line #(.DELAY(DELAY)) u_delay (
    .clk(clk), .rst_n(rst_n), .d(dd), .q(dd_del)
  );

  always_comb begin
    pv = dd ^ dr;
    pf = dd ^ dd_del;
    pe = err_t'(2 * (int'(pv) - int'(pf)));
  end

endmodule
