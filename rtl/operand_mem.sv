// operand_mem: storage for the N signal samples X_i (L_X bits each) or the
// N coefficients A_i (L_A+1 bits each, sign-magnitude).
//
// One synchronous write port for loading from outside and one asynchronous
// read port used by the processor while it steps through i = 0..N-1.
// The signal and coefficient stores and their sizes (N words of L_X and of
// L_A+1 bits) follow the described memory budget; the port arrangement is
// this design's choice.  No reset: contents are whatever was loaded.
module operand_mem #(
  parameter int unsigned WIDTH = 20,
  parameter int unsigned DEPTH = 100,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
