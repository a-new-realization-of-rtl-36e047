// tb_xstar_gen: self-checking testbench of the signed, scaled, recursively
// shifted operand generator.
//
// For random X and sign the generator is stepped K times, first = 1 on the
// first step; after step j its output must equal floor(+-X 2^M0 / 2^(jM))
// computed directly in 64-bit arithmetic.  A cycle with step = 0 must leave
// the held value unchanged.  Runs the default sizes (L_X = 20, M = 6,
// M0 = 0) and a small one with M0 = 2.
module tb_xstar_gen;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic [1:0] done = '0;

  localparam int CFG_LX [2] = '{20, 12};
  localparam int CFG_M  [2] = '{6, 2};
  localparam int CFG_M0 [2] = '{0, 2};
  localparam int STEPS = 4;

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int LX = CFG_LX[c];
    localparam int M  = CFG_M[c];
    localparam int M0 = CFG_M0[c];

    logic signed [LX-1:0] x = '0;
    logic sign = 1'b0, first = 1'b0, step = 1'b0;
    logic signed [LX-1:0] xstar;

    xstar_gen #(.LX(LX), .M(M), .M0(M0)) dut (
      .clk, .rst_n, .x, .sign, .first, .step, .xstar
    );

    initial begin
      longint xv, base;
      bit sv;
      wait (rst_n);
      for (int t = 0; t < 200; t++) begin
        xv   = longint'($signed((LX - 1 - M0)'($urandom)));
        sv   = 1'($urandom);
        base = (sv ? -xv : xv) <<< M0;
        for (int j = 1; j <= STEPS; j++) begin
          @(negedge clk);
          x = LX'(xv); sign = sv; first = (j == 1); step = 1'b1;
          #1;
          checks++;
          if (longint'(xstar) !== (base >>> (j * M))) begin
            failures++;
            $display("FAIL cfg%0d x=%0d s=%0b j=%0d: %0d expected %0d",
                     c, xv, sv, j, xstar, base >>> (j * M));
          end
          if (j == 2) begin
            // a held cycle: the next step still yields the j = 3 value
            @(negedge clk);
            step = 1'b0; first = 1'b0; x = LX'($urandom);
          end
        end
        @(negedge clk);
        step = 1'b0;
      end
      done[c] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
