// sp_method1: multiplier-free sum of products Y = sum_{i<N} A_i X_i by
// partitioned arithmetic, Method I, built around one small RAM.
//
// Each coefficient magnitude is cut into K fields a_ij of M = L_A/K bits.
// Rather than multiplying, the processor sorts the work by field value:
//   Phase 1  for every (i, j) the operand X~*_ij = a_is 2^(M0-jM) X_i is
//            added into RAM word a_ij, so word l ends up holding S_l, the
//            sum of all operands whose field equals l (eq. 7).
//   Phase 2  l = 2^M-1 down to 1: ADD2 accumulates the words and writes
//            each running sum back, turning S_l into S~_l = sum_{m>=l} S_m.
//   Phase 3  l = 2^M-1 down to 1: ADD2 sums the S~_l; the total is
//            sum_l l*S_l = Y and leaves through SW4.
// Cost: K*N + 2(2^M-1) additions and no multiplications.  A clearing pass
// of 2^M cycles, which zeroes the RAM, precedes phase 1.
//
// Interface: load X_i through x_we/x_waddr/x_wdata and A_i (sign bit
// L_A, 1 = negative; magnitude below) through a_we/a_waddr/a_wdata while
// idle; pulse start.  busy stays high for 2^M + K*N + 2(2^M-1) cycles;
// then y_valid pulses for one cycle with y, which holds until the next
// result.  phase shows the current pass.
// Formats: X, partial sums and Y are L_X-bit two's complement with X's
// binary point; right shifts truncate toward minus infinity and sums wrap,
// so the inputs must be scaled to keep Y in range.
// The datapath (sign multiplier, 2^M0, recursive 2^-M shifter, ADD1, RAM
// addressed by a_ij or a sequential address, ADD2 with its delay, switches
// SW1-SW4) follows the described hardware; the clearing pass, the RAM
// timing and the load/start interface are this design's choices.
module sp_method1
  import pa_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned LA = DEF_LA,
  parameter int unsigned K  = DEF_K,
  parameter int unsigned LX = DEF_LX,
  parameter int unsigned M0 = DEF_M0,
  localparam int unsigned M  = LA / K,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // signal memory load
  input  logic                 x_we,
  input  logic [IW-1:0]        x_waddr,
  input  logic [LX-1:0]        x_wdata,
  // coefficient memory load
  input  logic                 a_we,
  input  logic [IW-1:0]        a_waddr,
  input  logic [LA:0]          a_wdata,
  // control and result
  input  logic                 start,
  output logic                 busy,
  output sp_phase_e            phase,
  output logic                 y_valid,
  output logic signed [LX-1:0] y
);

  localparam int unsigned JW = $clog2(K + 1);

  // ---------------------------------------------------------------- control
  sp_sw_t        sw;
  logic [IW-1:0] i_idx;
  logic [JW-1:0] j_idx;
  logic          first, xstep, acc_clr, acc_en, y_load;
  logic [M-1:0]  seq_addr;

  sp_ctrl #(.N(N), .K(K), .M(M)) u_ctrl (
    .clk, .rst_n, .start, .phase, .sw, .i_idx, .j_idx, .first, .xstep,
    .seq_addr, .acc_clr, .acc_en, .y_load, .busy
  );

  // --------------------------------------------------------------- operands
  logic [LX-1:0] x_rd;
  logic [LA:0]   a_rd;

  operand_mem #(.WIDTH(LX), .DEPTH(N)) u_xmem (
    .clk, .we(x_we), .waddr(x_waddr), .wdata(x_wdata), .raddr(i_idx), .rdata(x_rd)
  );

  operand_mem #(.WIDTH(LA + 1), .DEPTH(N)) u_amem (
    .clk, .we(a_we), .waddr(a_waddr), .wdata(a_wdata), .raddr(i_idx), .rdata(a_rd)
  );

  // Partial bit stream a_ij: field j of the magnitude, j = 1 the most
  // significant.
  logic [LA-1:0] mag_shifted;
  logic [M-1:0]  a_ij;
  always_comb begin
    mag_shifted = a_rd[LA-1:0] >> ((K - 32'(j_idx)) * M);
    a_ij        = mag_shifted[M-1:0];
  end

  // ----------------------------------------------------------- step 1 unit
  logic signed [LX-1:0] xstar;

  xstar_gen #(.LX(LX), .M(M), .M0(M0)) u_xstar (
    .clk, .rst_n, .x(x_rd), .sign(a_rd[LA]), .first, .step(xstep), .xstar
  );

  // ------------------------------------------------------ RAM and adders
  logic [M-1:0]         ram_addr;
  logic                 ram_we;
  logic signed [LX-1:0] ram_wdata, ram_rdata, add1, add2_in, add2_sum, add2_tau;

  assign ram_addr = sw.sw1_seq ? seq_addr : a_ij;                 // SW1

  ps_ram #(.WIDTH(LX), .DEPTH(1 << M)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  assign add1    = xstar + (sw.sw2_add2 ? '0 : ram_rdata);          // SW2 side 1, ADD1
  assign add2_in = sw.sw2_add2 ? ram_rdata : '0;                    // SW2 side 2

  add2_acc #(.WIDTH(LX)) u_add2 (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en), .din(add2_in), .sum(add2_sum), .tau(add2_tau)
  );

  always_comb begin                                                 // SW3
    ram_we    = (sw.sw3 != SW3_OFF);
    ram_wdata = '0;
    unique case (sw.sw3)
      SW3_ADD1: ram_wdata = add1;
      SW3_ADD2: ram_wdata = add2_sum;
      default:  ram_wdata = '0;
    endcase
  end

  // ------------------------------------------------------------ output SW4
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= y_load;
      if (sw.sw4_on && y_load) y <= add2_sum;
    end
  end

  // Sizes must partition the coefficient exactly.
  if (LA % K != 0) begin : g_bad_partition
    $error("sp_method1: LA (%0d) must be a multiple of K (%0d)", LA, K);
  end

endmodule
