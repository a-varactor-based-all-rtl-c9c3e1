// dlf: programmable proportional-integral digital loop filter with slicer.
//
// The DCO control word is code = phi_int + (u << beta_sh), where the integral
// register is updated as phi_int += (u << alpha_sh) on every CK_ref edge.
// The filter input u is the phase error phi_e itself (frequency acquisition)
// or, when use_slicer is set, the slicer's Up/Down decision: +1 when
// phi_e > 0, -1 otherwise (phase acquisition and later modes). Gains are
// powers of two in units of one fractional LSB of the 14-bit word (8 integer
// + 6 fractional bits), so alpha = 1/64 and beta = 1/8 code LSB are
// alpha_sh = 0 and beta_sh = 3. The structure follows the source design;
// the power-of-two gains, the two-level slicer, the saturation and the
// mid-scale reset value are this design's own.
//
// Timing: phi_int and code are registers updated on each CK_ref rising
// edge from the phi_e present before it.
`timescale 1ps / 1fs
module dlf
  import adpll_pkg::*;
#(
  parameter int              ERR_W     = 10,
  parameter logic [CODE_W-1:0] INIT_CODE = 14'h2000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ERR_W-1:0] phi_e,
  input  logic                    use_slicer,
  input  logic [3:0]              alpha_sh,
  input  logic [3:0]              beta_sh,
  output logic [CODE_W-1:0]       phi_int,
  output logic [CODE_W-1:0]       code
);

  localparam int ACC_W = CODE_W + ERR_W + 17;   // room for u << 15
  localparam logic signed [ACC_W-1:0] CMAX = ACC_W'((1 << CODE_W) - 1);

  logic signed [ERR_W-1:0] u;
  logic signed [ACC_W-1:0] i_term, p_term, i_next, c_next;

  function automatic logic [CODE_W-1:0] sat(input logic signed [ACC_W-1:0] v);
    if (v < 0)         return '0;
    else if (v > CMAX) return CMAX[CODE_W-1:0];
    else               return v[CODE_W-1:0];
  endfunction

  always_comb begin
    if (use_slicer) u = (phi_e > 0) ? ERR_W'(1) : -ERR_W'(1);
    else            u = phi_e;
    i_term = ACC_W'(u) <<< alpha_sh;
    p_term = ACC_W'(u) <<< beta_sh;
    i_next = $signed({{(ACC_W-CODE_W){1'b0}}, phi_int}) + i_term;
    c_next = $signed({{(ACC_W-CODE_W){1'b0}}, sat(i_next)}) + p_term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi_int <= INIT_CODE;
      code    <= INIT_CODE;
    end else begin
      phi_int <= sat(i_next);
      code    <= sat(c_next);
    end
  end

endmodule
