// ps_ram: partial-sum RAM of the SP and TSP processors.
//
// DEPTH words of WIDTH bits.  The read port is asynchronous, the write port
// synchronous, so a word can be read, added to and written back to the same
// address within one clock cycle (the read-modify-write of phase 1 of the
// sum-of-products procedure).  A write and a read of the same address in one
// cycle return the old word on rdata; the new one is visible from the next
// cycle.  No reset: the processors clear the words they use before use.
// The RAM itself, its address from the partial bit stream a_ij and its
// in-place update follow the described hardware; the asynchronous read is
// this design's choice.
module ps_ram #(
  parameter int unsigned WIDTH = 20,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
