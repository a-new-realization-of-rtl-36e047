// tb_tsp_unit: self-checking testbench of the transposed sum-of-products
// processor.
//
// Two instances: the 8-coefficient worked example (1 sign + 4 magnitude
// bits, K = 2, M = 2, M0 = 1, L_X = 16) and the default sizes (N = 100,
// L_A = 12, K = 2, L_X = 20, M0 = 0).  For each X the testbench checks every
// output Y_i, its index and order, the first-output latency (2^M table
// cycles + K after the start cycle) and the output rate (one result every K cycles).  With X a
// multiple of 2^(L_A-M0) the result must equal A_i X exactly; for random X
// (scaled so that 2^M0 X (2^M - 1) fits in L_X bits)
// it must equal a model of the same rounding: T_l = 2^M0 X l,
// v = floor((v + T_(a_ij)) / 2^M) for j = K..1, Y_i = +-v.
module tb_tsp_unit;
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

  localparam logic [4:0] EX_A [8] = '{5'b10101, 5'b01101, 5'b01010, 5'b10001,
                                      5'b11001, 5'b00110, 5'b00011, 5'b01110};
  // the same coefficients in units of 1/8
  localparam int EX_V [8] = '{-5, 13, 10, -1, -9, 6, 3, 14};

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int N  = CFG_N[c];
    localparam int LA = CFG_LA[c];
    localparam int K  = CFG_K[c];
    localparam int LX = CFG_LX[c];
    localparam int M0 = CFG_M0[c];
    localparam int M  = LA / K;
    localparam int IW = (N > 1) ? $clog2(N) : 1;
    // start cycle + 2^M table cycles + K reads for Y_0
    localparam int FIRST_LAT = 1 + (1 << M) + K;
    // largest |X| whose table multiple 2^M0 X (2^M - 1) fits in LX bits
    localparam int XB = LX - 1 - M0 - M;
    // bits of k for exact signals X = k 2^(LA-M0) within that range
    localparam int KB = XB - (LA - M0) + 1;

    logic a_we = 1'b0, start = 1'b0;
    logic [IW-1:0] a_waddr = '0;
    logic [LA:0]   a_wdata = '0;
    logic signed [LX-1:0] x = '0;
    logic busy, y_valid;
    tsp_phase_e phase;
    logic [IW-1:0] y_idx;
    logic signed [LX-1:0] y;

    tsp_unit #(.N(N), .LA(LA), .K(K), .LX(LX), .M0(M0)) dut (
      .clk, .rst_n, .a_we, .a_waddr, .a_wdata, .x, .start, .busy, .phase,
      .y_valid, .y_idx, .y
    );

    logic [LA:0] as [N];

    function automatic longint model_trunc(input int i, input longint xv);
      longint xsv = xv <<< M0;
      longint v = 0;
      for (int j = K; j >= 1; j--) begin
        longint fld = (as[i][LA-1:0] >> ((K - j) * M)) & ((1 << M) - 1);
        v = (v + xsv * fld) >>> M;
      end
      return as[i][LA] ? -v : v;
    endfunction

    function automatic longint model_exact(input int i, input longint xv);
      longint mag = longint'(as[i][LA-1:0]);
      return (as[i][LA] ? -mag : mag) * ((xv <<< M0) >>> LA);
    endfunction

    task automatic load_coefs();
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        a_we = 1'b1; a_waddr = IW'(i); a_wdata = as[i];
      end
      @(negedge clk);
      a_we = 1'b0;
    endtask

    // exact = 1: compare with A_i X, else with the rounding model
    task automatic run_and_check(input longint xv, input bit exact, input string what);
      int cycles = 0;
      int last = 0;
      int seen = 0;
      @(negedge clk); start = 1'b1; x = LX'(xv);
      @(negedge clk); start = 1'b0; x = '0; cycles = 1;
      while (seen < N && cycles < 20 * N + (4 << M)) begin
        if (y_valid) begin
          longint exp_y = exact ? model_exact(seen, xv) : model_trunc(seen, xv);
          checks++;
          if (LX'(longint'(y)) !== LX'(exp_y) || int'(y_idx) != seen) begin
            failures++;
            $display("FAIL cfg%0d %s: Y_%0d (idx %0d) = %0d expected %0d",
                     c, what, seen, y_idx, y, exp_y);
          end
          checks++;
          if ((seen == 0 && cycles != FIRST_LAT) || (seen > 0 && cycles - last != K)) begin
            failures++;
            $display("FAIL cfg%0d %s: output %0d at cycle %0d (previous %0d)",
                     c, what, seen, cycles, last);
          end
          last = cycles;
          seen++;
        end
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (seen != N || busy) begin
        failures++;
        $display("FAIL cfg%0d %s: %0d outputs, busy=%0b", c, what, seen, busy);
      end
    endtask

    initial begin
      wait (rst_n);
      if (c == 0) begin
        for (int i = 0; i < 8; i++) as[i] = (LA + 1)'(EX_A[i]);
        load_coefs();
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (model_exact(i, 24) != EX_V[i] * 3) begin
            failures++;
            $display("FAIL cfg0: reference disagrees with the worked example at %0d", i);
          end
        end
        run_and_check(24, 1'b1, "worked example");
        run_and_check(-40, 1'b1, "worked example");
      end
      for (int t = 0; t < 3; t++) begin
        for (int i = 0; i < N; i++) as[i] = (LA + 1)'($urandom);
        if (t == 0) as[0] = {1'b1, {LA{1'b1}}};
        load_coefs();
        run_and_check(longint'($signed(KB'($urandom))) <<< (LA - M0), 1'b1, "exact");
        run_and_check(longint'($signed(XB'($urandom))), 1'b0, "random");
        run_and_check(-(longint'(1) <<< (XB - 1)), 1'b0, "negative full scale");
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
