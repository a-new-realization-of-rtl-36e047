// add2_acc: the accumulator ADD2 of the Method I datapath.
//
// An adder whose second input is its own output delayed by one cycle (the
// tau register).  sum = din + tau is combinational; on a clock edge with
// en = 1 the register takes sum.  clr empties the register (it takes
// precedence over en), so the first sum after a clear equals din.
// Arithmetic is WIDTH-bit two's complement and wraps on overflow; input
// scaling is expected to keep the final sums in range.  The adder-plus-
// delay structure is the one drawn for ADD2; the clear input and the
// synchronous active-low reset are this design's choices.
module add2_acc #(
  parameter int unsigned WIDTH = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic signed [WIDTH-1:0] din,
  output logic signed [WIDTH-1:0] sum,
  output logic signed [WIDTH-1:0] tau
);

  assign sum = din + tau;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) tau <= '0;
    else if (en)       tau <= sum;
  end

endmodule
