// Four pulse-comparison symbol synchronizers side by side, with a jitter
// meter on each, as in the comparison set-up.
//
// All four take the same received data DD: index 0 is both transitions at
// the bit rate, manual (b-m); 1 is automatic (b-a); 2 is positive
// transitions at quarter rate, manual (p-m/4); 3 is automatic (p-a/4).
// Each recovers its own clock CKR and retimed data, and its meter compares
// CKR with the emitter clock CKE to give one jitter sample per bit. The
// noise source, noise filter and receive prefilter of the set-up are
// outside this module: dd arrives already sliced to a logic level.
//
// Timing: everything runs on one sample clock with SAMPLES_PER_BIT ticks
// per bit (1000 at the defaults, the document's sampling step at 1 baud).
// cke should rise at the start of each transmitted bit. jitter[i] is in
// units of 1/SAMPLES_PER_BIT of a bit, updated when jitter_valid[i] pulses.
module sync_top
  import sync_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_BIT = 1000,
  parameter real         KA              = 0.08,
  parameter real         FC_HZ           = 0.5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    dd,
  input  logic                    cke,
  output logic [3:0]              ckr,
  output logic [3:0]              dr,
  output err_t [3:0]              pe,
  output logic signed [3:0][15:0] jitter,
  output logic [3:0]              jitter_valid
);

  for (genvar i = 0; i < 4; i++) begin : g_sync
    quad_clk_t quad_unused;
    logic      pv_unused, pf_unused;

    symbol_sync #(
      .SAMPLES_PER_BIT(SAMPLES_PER_BIT),
      .VARIANT(variant_e'(i)),
      .KA(KA),
      .FC_HZ(FC_HZ)
    ) u_sync (
      .clk(clk), .rst_n(rst_n), .dd(dd),
      .ck(ckr[i]), .quad(quad_unused), .dr(dr[i]),
      .pv(pv_unused), .pf(pf_unused), .pe(pe[i]));

    jitter_meter #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT)) u_meter (
      .clk(clk), .rst_n(rst_n), .ckr(ckr[i]), .cke(cke),
      .jitter(jitter[i]), .valid(jitter_valid[i]));
  end

endmodule
