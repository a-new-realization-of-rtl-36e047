// tb_sp_ctrl: self-checking testbench of the Method I phase sequencer.
//
// After start, every cycle's outputs are compared with the schedule the
// sequencer must follow: a clearing pass over l = 0..2^M-1 (RAM written
// with zero), phase 1 over i = 0..N-1, j = 1..K with SW1-SW3 at side 1,
// phase 2 over l = 2^M-1..1 with SW1-SW3 at side 2 and the ADD2 register
// cleared in its last cycle, phase 3 over the same addresses with SW3 off
// and SW4 closed only in the last cycle, then idle.  Also checks that start
// is ignored while busy.  Runs the default sizes (N = 100, K = 2, M = 6) and
// a small one (N = 5, K = 3, M = 2).
module tb_sp_ctrl;
  import pa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic [1:0] done = '0;

  localparam int CFG_N [2] = '{100, 5};
  localparam int CFG_K [2] = '{2, 3};
  localparam int CFG_M [2] = '{6, 2};

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int N  = CFG_N[c];
    localparam int K  = CFG_K[c];
    localparam int M  = CFG_M[c];
    localparam int IW = (N > 1) ? $clog2(N) : 1;
    localparam int JW = $clog2(K + 1);

    logic start = 1'b0;
    sp_phase_e phase;
    sp_sw_t sw;
    logic [IW-1:0] i_idx;
    logic [JW-1:0] j_idx;
    logic first, xstep, acc_clr, acc_en, y_load, busy;
    logic [M-1:0] seq_addr;

    sp_ctrl #(.N(N), .K(K), .M(M)) dut (
      .clk, .rst_n, .start, .phase, .sw, .i_idx, .j_idx, .first, .xstep,
      .seq_addr, .acc_clr, .acc_en, .y_load, .busy
    );

    task automatic expect_cycle(input sp_phase_e ph, input sp_sw_t esw, input int addr,
                                input int ei, input int ej, input bit eclr,
                                input bit een, input bit eload);
      bit ok = 1'b1;
      if (phase !== ph || sw !== esw || !busy) ok = 1'b0;
      if (ph == SP_PH1) begin
        if (int'(i_idx) !== ei || int'(j_idx) !== ej || first !== (ej == 1) || !xstep) ok = 1'b0;
      end else begin
        if (int'(seq_addr) !== addr || xstep) ok = 1'b0;
      end
      if (acc_clr !== eclr || acc_en !== een || y_load !== eload) ok = 1'b0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL cfg%0d: phase %s sw %p addr %0d i %0d j %0d clr %0b en %0b load %0b; expected %s %p addr %0d i %0d j %0d",
                 c, phase.name(), sw, seq_addr, i_idx, j_idx, acc_clr, acc_en, y_load,
                 ph.name(), esw, addr, ei, ej);
      end
      @(negedge clk);
      start = 1'b1;   // must be ignored while busy
    endtask

    initial begin
      wait (rst_n);
      for (int run = 0; run < 2; run++) begin
        @(negedge clk); start = 1'b1;
        @(negedge clk); start = 1'b0;
        for (int l = 0; l < (1 << M); l++)
          expect_cycle(SP_CLEAR, '{1'b1, 1'b1, SW3_ZERO, 1'b0}, l, 0, 0, 1'b1, 1'b0, 1'b0);
        for (int i = 0; i < N; i++)
          for (int j = 1; j <= K; j++)
            expect_cycle(SP_PH1, '{1'b0, 1'b0, SW3_ADD1, 1'b0}, 0, i, j, 1'b1, 1'b0, 1'b0);
        for (int l = (1 << M) - 1; l >= 1; l--)
          expect_cycle(SP_PH2, '{1'b1, 1'b1, SW3_ADD2, 1'b0}, l, 0, 0, l == 1, 1'b1, 1'b0);
        for (int l = (1 << M) - 1; l >= 1; l--)
          expect_cycle(SP_PH3, '{1'b1, 1'b1, SW3_OFF, l == 1}, l, 0, 0, 1'b0, 1'b1, l == 1);
        start = 1'b0;
        checks++;
        if (busy || phase != SP_IDLE) begin
          failures++;
          $display("FAIL cfg%0d: not idle after phase 3", c);
        end
        repeat (3) @(negedge clk);
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
