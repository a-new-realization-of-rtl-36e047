// xstar_gen: forms the shifted, signed operand X~*_ij = a_is 2^(M0-jM) X_i
// of the Method I sum of products (eq. 5) with a single M-bit shifter.
//
// The input word is multiplied by the sign of A_i (negated when
// sign = 1), scaled by 2^M0 (left shift by M0) and passed through an adder
// whose other input is the previous result held in a tau register, and
// then through an arithmetic right shift by M bits.  For j = 1 (first = 1)
// the adder takes the new input and ignores the register; for j > 1 it
// takes only the register, so the shift by jM bits is done recursively,
// M bits per step.  xstar is combinational from the inputs and the
// register; the register loads xstar on every clock edge with step = 1.
// Interface: x (L_X-bit two's complement), sign, first, step; output
// xstar, L_X bits.  Shifts truncate toward minus infinity.
// The chain sign -> 2^M0 -> adder -> 2^-M with the register fed back to
// the adder follows the drawn datapath; how the adder selects between its
// two inputs (by gating one to zero) is this design's choice.
module xstar_gen #(
  parameter int unsigned LX = 20,
  parameter int unsigned M  = 6,
  parameter int unsigned M0 = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [LX-1:0] x,
  input  logic                 sign,
  input  logic                 first,
  input  logic                 step,
  output logic signed [LX-1:0] xstar
);

  logic signed [LX-1:0] x_signed, x_scaled, add_a, add_b, add_out, tau;

  always_comb begin
    x_signed = sign ? -x : x;
    x_scaled = x_signed <<< M0;
    add_a    = first ? x_scaled : '0;
    add_b    = first ? '0 : tau;
    add_out  = add_a + add_b;
    xstar    = add_out >>> M;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    tau <= '0;
    else if (step) tau <= xstar;
  end

endmodule
