// tb_sp_method2: self-checking testbench of the Method II sum-of-products
// processor.
//
// Two instances run side by side:
//  * the 8-term worked example (N = 8, 1 sign + 4 magnitude bits cut into
//    K = 2 fields of M = 2 bits, M0 = 1): coefficients 1 0101, 0 1101,
//    0 1010, 1 0001, 1 1001, 0 0110, 0 0011, 0 1110, whose values in
//    units of 1/8 are -5, 13, 10, -1, -9, 6, 3, 14;
//  * the default sizes (N = 100, L_A = 12, K = 2, L_X = 20, M0 = 0).
// Each runs several sums: signals that are multiples of 2^(L_A-M0), for
// which the result is exact and is compared with sum A_i X_i, and random
// signals, compared with a model of Method II's rounding: exact bin sums
// S_jl, each S_l formed as v = floor((v + S_jl) / 2^M) for j = K..1, and
// Y = sum_l l * S_l evaluated directly.  The latency from start to y_valid
// is checked against K*2^M + K*N + K(2^M - 1) + 2(2^M - 1) processing
// cycles plus one for the output register.
module tb_sp_method2;
  import pa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic [1:0] done = '0;

  localparam int CFG_N  [2] = '{8, 100};
  localparam int CFG_LA [2] = '{4, 12};
  localparam int CFG_K  [2] = '{2, 2};
  localparam int CFG_LX [2] = '{16, 20};
  localparam int CFG_M0 [2] = '{1, 0};

  // worked example: coefficients (sign, magnitude) and signals
  localparam logic [4:0] EX_A [8] = '{5'b10101, 5'b01101, 5'b01010, 5'b10001,
                                      5'b11001, 5'b00110, 5'b00011, 5'b01110};
  localparam longint EX_X [8] = '{8, 16, -24, 40, 8, -56, 64, 24};

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int N  = CFG_N[c];
    localparam int LA = CFG_LA[c];
    localparam int K  = CFG_K[c];
    localparam int LX = CFG_LX[c];
    localparam int M0 = CFG_M0[c];
    localparam int M  = LA / K;
    localparam int IW = (N > 1) ? $clog2(N) : 1;
    // clearing + binning + merging + two passes, plus the output register
    localparam int LAT = K * (1 << M) + K * N + K * ((1 << M) - 1) + 2 * ((1 << M) - 1) + 1;

    logic x_we = 1'b0, a_we = 1'b0, start = 1'b0;
    logic [IW-1:0] x_waddr = '0, a_waddr = '0;
    logic [LX-1:0] x_wdata = '0;
    logic [LA:0]   a_wdata = '0;
    logic busy, y_valid;
    sp2_phase_e phase;
    logic signed [LX-1:0] y;

    sp_method2 #(.N(N), .LA(LA), .K(K), .LX(LX), .M0(M0)) dut (
      .clk, .rst_n, .x_we, .x_waddr, .x_wdata, .a_we, .a_waddr, .a_wdata,
      .start, .busy, .phase, .y_valid, .y
    );

    longint xs [N];
    logic [LA:0] as [N];

    // Model of Method II rounding: one truncating shift chain per S_l.
    function automatic longint model_trunc();
      longint bin_sum [K][1 << M];
      longint acc = 0;
      for (int j = 0; j < K; j++)
        for (int l = 0; l < (1 << M); l++) bin_sum[j][l] = 0;
      for (int i = 0; i < N; i++) begin
        longint sx = as[i][LA] ? -xs[i] : xs[i];
        for (int j = 1; j <= K; j++) begin
          int fld = int'((as[i][LA-1:0] >> ((K - j) * M)) & ((1 << M) - 1));
          bin_sum[j-1][fld] += sx <<< M0;
        end
      end
      for (int l = 1; l < (1 << M); l++) begin
        longint v = 0;
        for (int j = K; j >= 1; j--) v = (v + bin_sum[j-1][l]) >>> M;
        acc += longint'(l) * v;
      end
      return acc;
    endfunction

    // Exact sum of products in units of the X LSB; valid when every
    // X_i is a multiple of 2^(LA-M0).
    function automatic longint model_exact();
      longint acc = 0;
      for (int i = 0; i < N; i++) begin
        longint mag = longint'(as[i][LA-1:0]);
        acc += (as[i][LA] ? -mag : mag) * ((xs[i] <<< M0) >>> LA);
      end
      return acc;
    endfunction

    task automatic load_all();
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        x_we = 1'b1; x_waddr = IW'(i); x_wdata = LX'(xs[i]);
        a_we = 1'b1; a_waddr = IW'(i); a_wdata = as[i];
      end
      @(negedge clk);
      x_we = 1'b0; a_we = 1'b0;
    endtask

    task automatic run_and_check(input longint expected, input string what);
      int cycles = 0;
      longint got;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0; cycles = 1;
      while (!y_valid) begin
        @(negedge clk);
        cycles++;
      end
      got = longint'(y);
      checks++;
      if (LX'(got) !== LX'(expected)) begin
        failures++;
        $display("FAIL cfg%0d %s: y=%0d expected=%0d", c, what, got, expected);
      end
      checks++;
      if (cycles !== LAT) begin
        failures++;
        $display("FAIL cfg%0d %s: latency %0d cycles, expected %0d", c, what, cycles, LAT);
      end
      @(negedge clk);
      checks++;
      if (busy || y_valid) begin
        failures++;
        $display("FAIL cfg%0d %s: not idle after the result", c, what);
      end
    endtask

    initial begin
      longint ex;
      wait (rst_n);
      if (c == 0) begin
        // worked example coefficients
        // X = 8 * k so every product is exact; weights in 1/8 units
        for (int i = 0; i < 8; i++) begin
          as[i] = (LA + 1)'(EX_A[i]);
          xs[i] = EX_X[i];
        end
        ex = -5*1 + 13*2 + 10*(-3) + (-1)*5 + (-9)*1 + 6*(-7) + 3*8 + 14*3;
        load_all();
        checks++;
        if (model_exact() != ex) begin
          failures++;
          $display("FAIL cfg0: reference disagrees with the worked example");
        end
        run_and_check(ex, "worked example");
      end
      // exact cases: X multiple of 2^(LA-M0)
      for (int t = 0; t < 3; t++) begin
        for (int i = 0; i < N; i++) begin
          as[i] = (LA + 1)'($urandom);
          xs[i] = longint'($signed(5'($urandom))) <<< (LA - M0);
        end
        if (t == 1) for (int i = 0; i < N; i++) as[i] = {1'b0, {LA{1'b1}}};
        load_all();
        run_and_check(model_exact(), "exact");
      end
      // random signals, truncating model
      for (int t = 0; t < 4; t++) begin
        for (int i = 0; i < N; i++) begin
          as[i] = (LA + 1)'($urandom);
          xs[i] = longint'($signed((LX - 4)'($urandom)));
        end
        load_all();
        run_and_check(model_trunc(), "random");
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
