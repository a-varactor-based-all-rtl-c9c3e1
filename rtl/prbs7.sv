// prbs7: pseudo-random phase index generator of the RSS engine.
//
// A 7-bit Fibonacci LFSR (x^7 + x^6 + 1, maximal length 127) advances once
// per reference clock cycle; its three least significant bits form RM_N,
// the index of the multi-phase reference clock used in the next period.
// The 7-bit PRBS and the 3-bit output follow the source design; the
// polynomial, the tap choice and the all-ones seed are this design's own.
// Because the register shifts by one bit per cycle, consecutive RM_N values
// share two bits, so the sequence is not truly random.
//
// Timing: rm_n changes right after each rising clk edge while en = 1.
`timescale 1ps / 1fs
module prbs7 #(
  parameter int          LFSR_W = 7,
  parameter int          OUT_W  = 3,
  parameter logic [6:0]  SEED   = 7'h7F
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [OUT_W-1:0] rm_n
);

  logic [LFSR_W-1:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lfsr <= SEED[LFSR_W-1:0];
    else if (en) lfsr <= {lfsr[LFSR_W-2:0], lfsr[6] ^ lfsr[5]};
  end

  assign rm_n = lfsr[OUT_W-1:0];

  initial assert (LFSR_W == 7 && OUT_W <= LFSR_W)
    else $error("prbs7: taps are for a 7-bit register");

endmodule
