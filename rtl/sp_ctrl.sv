// sp_ctrl: phase sequencer of the Method I sum-of-products processor.
//
// After start it runs four passes and returns to idle:
//   CLEAR  2^M cycles : sequential address l = 0 .. 2^M-1, RAM written with 0.
//   PH1    K*N cycles : for i = 0..N-1, j = 1..K: SW1, SW2, SW3 to side 1;
//                       the RAM word at a_ij gets X~*_ij added (eq. 7).
//   PH2    2^M-1 cycles: SW1, SW2, SW3 to side 2; l = 2^M-1 down to 1;
//                       ADD2 accumulates and its output is written back at
//                       l, giving S~_l (eq. 10).
//   PH3    2^M-1 cycles: SW1, SW2 to side 2, SW3 off; l = 2^M-1 down to 1;
//                       ADD2 accumulates; in the last cycle SW4 closes and
//                       y_load marks the final sum Y (eq. 11).
// Every output is a function of the current state only (Moore style), so a
// whole pass runs at one RAM access per cycle.  acc_clr empties the ADD2
// register during CLEAR and PH1 and in the last cycle of PH2, so each of
// PH2 and PH3 starts from zero.  start is ignored while busy.
// The three phases and their switch settings follow the described
// hardware; the clearing pass, the down-counting order inside the phases
// and the start/busy handshake are this design's choices.
module sp_ctrl
  import pa_pkg::*;
#(
  parameter int unsigned N = DEF_N,
  parameter int unsigned K = DEF_K,
  parameter int unsigned M = DEF_LA / DEF_K,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned JW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output sp_phase_e     phase,
  output sp_sw_t        sw,
  output logic [IW-1:0] i_idx,     // operand memory read address
  output logic [JW-1:0] j_idx,     // partial bit stream number, 1..K
  output logic          first,     // j = 1 (load a new X_i into the shifter)
  output logic          xstep,     // advance the recursive shifter
  output logic [M-1:0]  seq_addr,  // sequential address signal l
  output logic          acc_clr,
  output logic          acc_en,
  output logic          y_load,
  output logic          busy
);

  localparam logic [M-1:0]  LMAX = {M{1'b1}};            // 2^M - 1
  localparam logic [IW-1:0] ILAST = IW'(N - 1);
  localparam logic [JW-1:0] JLAST = JW'(K);

  sp_phase_e state;
  logic [IW-1:0] i_q;
  logic [JW-1:0] j_q;
  logic [M-1:0]  l_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= SP_IDLE;
      i_q   <= '0;
      j_q   <= JW'(1);
      l_q   <= '0;
    end else begin
      unique case (state)
        SP_IDLE: if (start) begin
          state <= SP_CLEAR;
          l_q   <= '0;
        end
        SP_CLEAR: begin
          l_q <= l_q + 1'b1;
          if (l_q == LMAX) begin
            state <= SP_PH1;
            i_q   <= '0;
            j_q   <= JW'(1);
          end
        end
        SP_PH1: begin
          if (j_q == JLAST) begin
            j_q <= JW'(1);
            i_q <= i_q + 1'b1;
            if (i_q == ILAST) begin
              state <= SP_PH2;
              l_q   <= LMAX;
            end
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        SP_PH2: begin
          l_q <= l_q - 1'b1;
          if (l_q == M'(1)) begin
            state <= SP_PH3;
            l_q   <= LMAX;
          end
        end
        SP_PH3: begin
          l_q <= l_q - 1'b1;
          if (l_q == M'(1)) state <= SP_IDLE;
        end
        default: state <= SP_IDLE;
      endcase
    end
  end

  always_comb begin
    phase    = state;
    i_idx    = i_q;
    j_idx    = j_q;
    seq_addr = l_q;
    first    = (j_q == JW'(1));
    xstep    = 1'b0;
    acc_clr  = 1'b0;
    acc_en   = 1'b0;
    y_load   = 1'b0;
    busy     = (state != SP_IDLE);
    sw       = '{sw1_seq: 1'b1, sw2_add2: 1'b1, sw3: SW3_OFF, sw4_on: 1'b0};
    unique case (state)
      SP_IDLE: ;
      SP_CLEAR: begin
        sw.sw3  = SW3_ZERO;
        acc_clr = 1'b1;
      end
      SP_PH1: begin
        sw.sw1_seq  = 1'b0;
        sw.sw2_add2 = 1'b0;
        sw.sw3      = SW3_ADD1;
        xstep       = 1'b1;
        acc_clr     = 1'b1;
      end
      SP_PH2: begin
        sw.sw3  = SW3_ADD2;
        acc_en  = 1'b1;
        acc_clr = (l_q == M'(1));
      end
      SP_PH3: begin
        acc_en = 1'b1;
        if (l_q == M'(1)) begin
          sw.sw4_on = 1'b1;
          y_load    = 1'b1;
        end
      end
      default: ;
    endcase
  end

endmodule
