// tb_pa_sp_tsp_top: end-to-end testbench of the three processors at their
// default sizes (N = 100, L_A = 12, K = 2, M = 6, L_X = 20, M0 = 0).
//
// Each round loads one coefficient set into all three units and runs them
// at the same time:
//  * both sum-of-products units compute Y = sum A_i X_i for one signal set;
//    Method I is compared with its per-term truncation model, Method II
//    with its per-bin model, and when the signals are multiples of 2^L_A
//    both must equal the exact sum;
//  * the transposed unit computes Y_i = A_i X for one X; every Y_i is
//    compared with its model, and when all X_i equal X the sum of the Y_i
//    must equal the Method I result.
// The testbench counts how often each mechanism occurred - every phase of
// each unit, negative coefficients through the sign multiplier, the
// recursive shift (j > 1), zero fields (l = 0) - and counts a failure for
// any that never did.
module tb_pa_sp_tsp_top;
  import pa_pkg::*;

  localparam int N  = DEF_N;
  localparam int LA = DEF_LA;
  localparam int K  = DEF_K;
  localparam int LX = DEF_LX;
  localparam int M0 = DEF_M0;
  localparam int M  = LA / K;
  localparam int IW = $clog2(N);
  localparam int XB = LX - 1 - M0 - M;   // |X| range the TSP table holds

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic sp1_x_we = 0, sp1_a_we = 0, sp1_start = 0;
  logic sp2_x_we = 0, sp2_a_we = 0, sp2_start = 0;
  logic tsp_a_we = 0, tsp_start = 0;
  logic [IW-1:0] sp1_x_waddr = '0, sp1_a_waddr = '0, sp2_x_waddr = '0, sp2_a_waddr = '0, tsp_a_waddr = '0;
  logic [LX-1:0] sp1_x_wdata = '0, sp2_x_wdata = '0;
  logic [LA:0]   sp1_a_wdata = '0, sp2_a_wdata = '0, tsp_a_wdata = '0;
  logic signed [LX-1:0] tsp_x = '0;
  logic sp1_busy, sp1_y_valid, sp2_busy, sp2_y_valid, tsp_busy, tsp_y_valid;
  sp_phase_e  sp1_phase;
  sp2_phase_e sp2_phase;
  tsp_phase_e tsp_phase;
  logic signed [LX-1:0] sp1_y, sp2_y, tsp_y;
  logic [IW-1:0] tsp_y_idx;

  pa_sp_tsp_top dut (.*);

  longint xs [N];
  logic [LA:0] as [N];
  longint tsp_got [N];

  function automatic longint field(input int i, input int j);
    return (as[i][LA-1:0] >> ((K - j) * M)) & ((1 << M) - 1);
  endfunction

  function automatic longint sgn(input int i, input longint v);
    return as[i][LA] ? -v : v;
  endfunction

  function automatic longint model_sp1();
    longint acc = 0;
    for (int i = 0; i < N; i++)
      for (int j = 1; j <= K; j++)
        acc += field(i, j) * ((sgn(i, xs[i]) <<< M0) >>> (j * M));
    return acc;
  endfunction

  function automatic longint model_sp2();
    longint bin_sum [K][1 << M];
    longint acc = 0;
    for (int j = 0; j < K; j++)
      for (int l = 0; l < (1 << M); l++) bin_sum[j][l] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 1; j <= K; j++)
        bin_sum[j-1][field(i, j)] += sgn(i, xs[i]) <<< M0;
    for (int l = 1; l < (1 << M); l++) begin
      longint v = 0;
      for (int j = K; j >= 1; j--) v = (v + bin_sum[j-1][l]) >>> M;
      acc += longint'(l) * v;
    end
    return acc;
  endfunction

  function automatic longint model_exact();
    longint acc = 0;
    for (int i = 0; i < N; i++)
      acc += sgn(i, longint'(as[i][LA-1:0])) * ((xs[i] <<< M0) >>> LA);
    return acc;
  endfunction

  function automatic longint model_tsp(input int i, input longint xv);
    longint v = 0;
    for (int j = K; j >= 1; j--) v = (v + (xv <<< M0) * field(i, j)) >>> M;
    return sgn(i, v);
  endfunction

  // ------------------------------------------------------ mechanism counts
  int n_sp1_clear, n_sp1_ph1, n_sp1_ph2, n_sp1_ph3, n_sp1_out;
  int n_sp2_clear, n_sp2_bin, n_sp2_merge, n_sp2_ph2, n_sp2_ph3, n_sp2_out;
  int n_tsp_table, n_tsp_out;
  int n_neg_coef, n_zero_field, n_recursive_shift;

  always @(posedge clk) if (rst_n) begin
    n_sp1_clear += (sp1_phase == SP_CLEAR);
    n_sp1_ph1   += (sp1_phase == SP_PH1);
    n_sp1_ph2   += (sp1_phase == SP_PH2);
    n_sp1_ph3   += (sp1_phase == SP_PH3);
    n_sp1_out   += sp1_y_valid;
    n_sp2_clear += (sp2_phase == SP2_CLEAR);
    n_sp2_bin   += (sp2_phase == SP2_BIN);
    n_sp2_merge += (sp2_phase == SP2_MERGE);
    n_sp2_ph2   += (sp2_phase == SP2_PH2);
    n_sp2_ph3   += (sp2_phase == SP2_PH3);
    n_sp2_out   += sp2_y_valid;
    n_tsp_table += (tsp_phase == TSP_TABLE);
    n_tsp_out   += tsp_y_valid;
    if (tsp_y_valid) tsp_got[tsp_y_idx] = longint'(tsp_y);
  end

  task automatic load(input bit same_x, input longint xv);
    for (int i = 0; i < N; i++) begin
      if (same_x) xs[i] = xv;
      n_neg_coef += as[i][LA];
      for (int j = 1; j <= K; j++) begin
        n_zero_field += (field(i, j) == 0);
        n_recursive_shift += (j > 1);
      end
      @(negedge clk);
      sp1_x_we = 1; sp1_x_waddr = IW'(i); sp1_x_wdata = LX'(xs[i]);
      sp2_x_we = 1; sp2_x_waddr = IW'(i); sp2_x_wdata = LX'(xs[i]);
      sp1_a_we = 1; sp1_a_waddr = IW'(i); sp1_a_wdata = as[i];
      sp2_a_we = 1; sp2_a_waddr = IW'(i); sp2_a_wdata = as[i];
      tsp_a_we = 1; tsp_a_waddr = IW'(i); tsp_a_wdata = as[i];
    end
    @(negedge clk);
    sp1_x_we = 0; sp2_x_we = 0; sp1_a_we = 0; sp2_a_we = 0; tsp_a_we = 0;
  endtask

  task automatic check(input longint got, input longint exp_v, input string what);
    checks++;
    if (LX'(got) !== LX'(exp_v)) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp_v);
    end
  endtask

  // mode 0: random signals; 1: exact signals; 2: all signals equal X
  task automatic round(input int mode);
    longint xv = longint'($signed(XB'($urandom)));
    longint y1, y2, tsp_sum;
    for (int i = 0; i < N; i++) begin
      as[i] = (LA + 1)'($urandom);
      if (mode == 1) xs[i] = longint'($signed(4'($urandom))) <<< (LA - M0);
      else           xs[i] = longint'($signed(XB'($urandom)));
    end
    if (mode == 2) xv = longint'($signed(2'($urandom))) <<< (LA - M0);
    load(mode == 2, xv);
    @(negedge clk);
    sp1_start = 1; sp2_start = 1; tsp_start = 1; tsp_x = LX'(xv);
    @(negedge clk);
    sp1_start = 0; sp2_start = 0; tsp_start = 0;
    fork
      begin wait (sp1_y_valid); y1 = longint'(sp1_y); end
      begin wait (sp2_y_valid); y2 = longint'(sp2_y); end
      begin @(negedge clk); wait (!tsp_busy); end
    join
    @(negedge clk);
    check(y1, model_sp1(), "Method I");
    check(y2, model_sp2(), "Method II");
    if (mode != 0) begin
      check(y1, model_exact(), "Method I exact");
      check(y2, model_exact(), "Method II exact");
    end
    tsp_sum = 0;
    for (int i = 0; i < N; i++) begin
      check(tsp_got[i], model_tsp(i, xv), $sformatf("TSP Y_%0d", i));
      tsp_sum += tsp_got[i];
    end
    if (mode == 2) check(tsp_sum, y1, "sum of TSP outputs vs Method I");
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 6; r++) round(r % 3);
    need(n_sp1_clear, "Method I clearing pass");
    need(n_sp1_ph1, "Method I phase 1 (binning)");
    need(n_sp1_ph2, "Method I phase 2");
    need(n_sp1_ph3, "Method I phase 3");
    need(n_sp1_out, "Method I result via SW4");
    need(n_sp2_clear, "Method II clearing pass");
    need(n_sp2_bin, "Method II binning");
    need(n_sp2_merge, "Method II merge shifts");
    need(n_sp2_ph2, "Method II step 4");
    need(n_sp2_ph3, "Method II step 5");
    need(n_sp2_out, "Method II result");
    need(n_tsp_table, "TSP table phase");
    need(n_tsp_out, "TSP outputs");
    need(n_neg_coef, "negative coefficient");
    need(n_zero_field, "zero field a_ij = 0");
    need(n_recursive_shift, "recursive shift j > 1");
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
