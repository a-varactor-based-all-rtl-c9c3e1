// multiphase_gen: multi-phase reference clock generator of the RSS engine.
//
// CK_ref is sampled by the DCO output clock and then passed down a chain of
// D flip-flops clocked by DCO_OUT, so tap k is CK_ref delayed by k DCO
// periods. Taps 0..P-1 are the P multi-phase reference clocks CK_ref[1:P]
// (same frequency as CK_ref, phases one DCO period apart); tap P is one more
// stage used by the random-sampling phase generator to find rising edges.
// The P-1 delay flip-flops follow the source design; the input sampling
// flip-flop and the extra tap are this design's own.
//
// Timing: tap 0 rises at the first DCO_OUT edge after CK_ref rises, tap k
// k DCO edges later.
`timescale 1ps / 1fs
module multiphase_gen #(
  parameter int P = 8
) (
  input  logic       dco_clk,
  input  logic       rst_n,
  input  logic       ck_ref,
  output logic [P:0] ck_ph
);

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) ck_ph <= '0;
    else        ck_ph <= {ck_ph[P-1:0], ck_ref};
  end

endmodule
