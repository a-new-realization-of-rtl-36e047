// tb_workloads: runs the sizes of the published operation-count tables on
// all three processors and checks both the results and the cycle counts.
//
// Configurations (L_A = 12, L_X = 20, M0 = 0): K = 2 with N = 20, 50, 100,
// 500 and 1000, and N = 100 with K = 3, 4 and 6 (fields of 4, 3, 2 bits).
// For each, random coefficients and signals that are multiples of 2^L_A
// (so that all results are exact) are loaded and:
//  * Method I must return sum A_i X_i after 2^M + (K N + 2(2^M - 1)) busy
//    cycles - a clearing pass plus one cycle per addition of the method;
//  * Method II must return the same Y after
//    K 2^M + K N + K(2^M - 1) + 2(2^M - 1) busy cycles;
//  * the transposed unit, given one X, must return every A_i X, the last
//    one raised 2^M + K N cycles after the start cycle.
// The normalised addition counts (K N + 2(2^M - 1)) / N and
// ((2^M - 2) + N(K - 1)) / N are printed for comparison with the tables.
module tb_workloads;
  import pa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int NCFG = 8;
  localparam int CFG_N [NCFG] = '{20, 50, 100, 500, 1000, 100, 100, 100};
  localparam int CFG_K [NCFG] = '{2, 2, 2, 2, 2, 3, 4, 6};
  localparam int LA = 12;
  localparam int LX = 20;
  logic [NCFG-1:0] done = '0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N  = CFG_N[c];
    localparam int K  = CFG_K[c];
    localparam int M  = LA / K;
    localparam int IW = $clog2(N);
    localparam int SP1_BUSY = (1 << M) + K * N + 2 * ((1 << M) - 1);
    localparam int SP2_BUSY = K * (1 << M) + K * N + K * ((1 << M) - 1) + 2 * ((1 << M) - 1);
    // start edge = sample 1; 2^M table + K N output cycles; the last
    // y_valid is sampled one edge after it is raised
    localparam int TSP_LAST = 1 + (1 << M) + K * N + 1;

    logic x_we = 0, a_we = 0, start = 0;
    logic [IW-1:0] waddr = '0;
    logic [LX-1:0] x_wdata = '0;
    logic [LA:0]   a_wdata = '0;
    logic signed [LX-1:0] tsp_x = '0;
    logic busy1, busy2, busyt, v1, v2, vt;
    sp_phase_e ph1;
    sp2_phase_e ph2;
    tsp_phase_e pht;
    logic signed [LX-1:0] y1, y2, yt;
    logic [IW-1:0] yt_idx;

    sp_method1 #(.N(N), .LA(LA), .K(K), .LX(LX), .M0(0)) u_sp1 (
      .clk, .rst_n, .x_we, .x_waddr(waddr), .x_wdata, .a_we, .a_waddr(waddr), .a_wdata,
      .start, .busy(busy1), .phase(ph1), .y_valid(v1), .y(y1)
    );
    sp_method2 #(.N(N), .LA(LA), .K(K), .LX(LX), .M0(0)) u_sp2 (
      .clk, .rst_n, .x_we, .x_waddr(waddr), .x_wdata, .a_we, .a_waddr(waddr), .a_wdata,
      .start, .busy(busy2), .phase(ph2), .y_valid(v2), .y(y2)
    );
    tsp_unit #(.N(N), .LA(LA), .K(K), .LX(LX), .M0(0)) u_tsp (
      .clk, .rst_n, .a_we, .a_waddr(waddr), .a_wdata, .x(tsp_x),
      .start, .busy(busyt), .phase(pht), .y_valid(vt), .y_idx(yt_idx), .y(yt)
    );

    logic [LA:0] as [N];
    longint xs [N];
    longint xv;
    int n1 = 0, n2 = 0, last_t = 0, nt = 0, cyc = 0;
    bit got1 = 0, got2 = 0;
    longint r1, r2;

    function automatic longint coef(input int i);
      longint mag = longint'(as[i][LA-1:0]);
      return as[i][LA] ? -mag : mag;
    endfunction

    // busy-cycle counters and TSP output checks, sampled each cycle from
    // the start cycle on (cyc = 1 at the start edge)
    bit running = 0;
    always @(posedge clk) if (running) begin
      longint e;
      cyc++;
      n1 += busy1;
      n2 += busy2;
      if (v1) begin got1 = 1; r1 = longint'(y1); end
      if (v2) begin got2 = 1; r2 = longint'(y2); end
      if (vt) begin
        e = coef(int'(yt_idx)) * (xv >>> LA);
        checks++;
        if (LX'(longint'(yt)) !== LX'(e) || int'(yt_idx) != nt) begin
          failures++;
          $display("FAIL N=%0d K=%0d TSP Y_%0d = %0d expected %0d", N, K, yt_idx, yt, e);
        end
        nt++;
        last_t = cyc;
      end
    end

    initial begin
      longint ex = 0;
      wait (rst_n);
      for (int i = 0; i < N; i++) begin
        as[i] = (LA + 1)'($urandom);
        xs[i] = longint'($signed(3'($urandom))) <<< LA;
        ex += coef(i) * (xs[i] >>> LA);
        @(negedge clk);
        x_we = 1; a_we = 1; waddr = IW'(i); x_wdata = LX'(xs[i]); a_wdata = as[i];
      end
      xv = longint'($signed(2'($urandom))) <<< (LA - 6);
      xv = xv <<< 6;  // a multiple of 2^LA within the table range
      @(negedge clk);
      x_we = 0; a_we = 0; tsp_x = LX'(xv); start = 1;
      running = 1;
      @(negedge clk);
      start = 0;
      wait (got1 && got2 && nt == N && !busyt);
      @(negedge clk);
      checks += 5;
      if (LX'(r1) !== LX'(ex)) begin failures++; $display("FAIL N=%0d K=%0d Method I %0d expected %0d", N, K, r1, ex); end
      if (LX'(r2) !== LX'(ex)) begin failures++; $display("FAIL N=%0d K=%0d Method II %0d expected %0d", N, K, r2, ex); end
      if (n1 !== SP1_BUSY) begin failures++; $display("FAIL N=%0d K=%0d Method I busy %0d expected %0d", N, K, n1, SP1_BUSY); end
      if (n2 !== SP2_BUSY) begin failures++; $display("FAIL N=%0d K=%0d Method II busy %0d expected %0d", N, K, n2, SP2_BUSY); end
      if (last_t !== TSP_LAST) begin failures++; $display("FAIL N=%0d K=%0d TSP last output at %0d expected %0d", N, K, last_t, TSP_LAST); end
      $display("N=%4d K=%0d M=%0d: SP additions/N = %0.2f, TSP additions/N = %0.2f, cycles SP1 %0d SP2 %0d TSP %0d",
               N, K, M, real'(K * N + 2 * ((1 << M) - 1)) / N,
               real'(((1 << M) - 2) + N * (K - 1)) / N, n1, n2, last_t);
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
