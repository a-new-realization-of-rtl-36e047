// tb_operand_mem: self-checking testbench of the signal / coefficient
// store.
//
// Fills a 100-word memory (the default N) of 20-bit words, then reads it
// back at random addresses while writing other words, comparing with a
// reference array; also checks that a write lands only at its address.
module tb_operand_mem;

  localparam int WIDTH = 20;
  localparam int DEPTH = 100;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic we = 1'b0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];

  operand_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 7'(a); wdata = WIDTH'($urandom); ref_mem[a] = wdata;
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      raddr = 7'($urandom % DEPTH);
      we = 1'($urandom);
      waddr = 7'($urandom % DEPTH);
      wdata = WIDTH'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
      if (we) ref_mem[waddr] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 7'(a); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL final read %0d", a);
      end
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
