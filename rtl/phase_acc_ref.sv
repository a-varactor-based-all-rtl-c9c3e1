// phase_acc_ref: reference phase accumulator (PA1) of the ADPLL engine.
//
// Adds the division ratio N on every CK_ref rising edge, so its value is the
// number of DCO cycles that should have elapsed: the reference phase in units
// of one DCO period. The accumulator wraps; only its difference with the DCO
// phase accumulator (PA2) is used. Width is this design's own choice.
//
// Timing: phase is a register updated on each CK_ref rising edge.
`timescale 1ps / 1fs
module phase_acc_ref #(
  parameter int PHASE_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         n_div,
  output logic [PHASE_W-1:0] phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + PHASE_W'(n_div);
  end

endmodule
