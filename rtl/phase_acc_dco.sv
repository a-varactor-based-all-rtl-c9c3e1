// phase_acc_dco: DCO phase accumulator (PA2) of the ADPLL engine.
//
// A counter clocked by DCO_OUT counts DCO cycles: the DCO phase in units of
// one DCO period. It counts in Gray code, and the count is sampled on the
// CK_ref rising edge and converted back to binary in the CK_ref domain, so a
// sample taken while the counter changes is wrong by at most one count.
// The counter follows the source design; the Gray-code crossing is this
// design's own.
//
// Timing: phase is the DCO cycle count at the latest CK_ref rising edge.
`timescale 1ps / 1fs
module phase_acc_dco #(
  parameter int PHASE_W = 16
) (
  input  logic               dco_clk,
  input  logic               ck_ref,
  input  logic               rst_n,
  output logic [PHASE_W-1:0] phase
);

  logic [PHASE_W-1:0] bin_q, gray_q, gray_s;

  // DCO domain: binary counter with a registered Gray copy.
  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_q  <= '0;
      gray_q <= '0;
    end else begin
      bin_q  <= bin_q + 1'b1;
      gray_q <= (bin_q + 1'b1) ^ ((bin_q + 1'b1) >> 1);
    end
  end

  // CK_ref domain: sample the Gray count.
  always_ff @(posedge ck_ref or negedge rst_n) begin
    if (!rst_n) gray_s <= '0;
    else        gray_s <= gray_q;
  end

  // Gray to binary.
  always_comb begin
    phase[PHASE_W-1] = gray_s[PHASE_W-1];
    for (int i = PHASE_W - 2; i >= 0; i--) phase[i] = phase[i+1] ^ gray_s[i];
  end

endmodule
