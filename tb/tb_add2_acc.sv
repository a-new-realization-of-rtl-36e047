// tb_add2_acc: self-checking testbench of the ADD2 accumulator.
//
// Drives random inputs with random enable and clear and compares the
// combinational sum and the held value with a 20-bit wrapping model:
// sum = din + held; held takes sum when en = 1, zero when clr = 1.
module tb_add2_acc;

  localparam int WIDTH = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic clr = 1'b0, en = 1'b0;
  logic signed [WIDTH-1:0] din = '0, sum, tau;
  logic [WIDTH-1:0] model = '0;

  add2_acc #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .clr, .en, .din, .sum, .tau);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      din = WIDTH'($urandom);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 16) == 0;
      #1;
      checks++;
      if (sum !== WIDTH'(model + din) || tau !== model) begin
        failures++;
        $display("FAIL t=%0d: sum=%h tau=%h expected %h %h", t, sum, tau, model + din, model);
      end
      if (clr)     model = '0;
      else if (en) model = model + din;
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
