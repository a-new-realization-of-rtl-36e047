// tb_ps_ram: self-checking testbench of the partial-sum RAM.
//
// Writes every word of a 64 x 20 RAM (the default size) with a random
// value, reads all back, then does read-modify-write cycles at random
// addresses: in the write cycle rdata must still show the old word, and
// the next cycle the new one.  A reference array holds the expected data.
module tb_ps_ram;

  localparam int WIDTH = 20;
  localparam int DEPTH = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic we = 1'b0;
  logic [5:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];

  ps_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .addr, .wdata, .rdata);

  task automatic check(input logic [WIDTH-1:0] exp_v, input string what);
    checks++;
    if (rdata !== exp_v) begin
      failures++;
      $display("FAIL %s at %0d: %h expected %h", what, addr, rdata, exp_v);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 6'(a); wdata = WIDTH'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      addr = 6'(a); #1; check(ref_mem[a], "read");
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      addr = 6'($urandom); we = 1'b1; #1;
      check(ref_mem[addr], "old word");
      wdata = rdata + WIDTH'($urandom % 1000);
      ref_mem[addr] = wdata;
      @(negedge clk); we = 1'b0; #1;
      check(ref_mem[addr], "new word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
