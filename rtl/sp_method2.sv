// sp_method2: multiplier-free sum of products Y = sum_{i<N} A_i X_i by
// partitioned arithmetic, Method II.
//
// Method II moves the shifts out of the per-operand loop.  Every operand is
// only signed and scaled, X*_i = a_is 2^M0 X_i, and is binned separately
// for each field position j:
//   BIN    (K*N cycles)      RAM word (j, a_ij) += X*_i, giving S_jl (eq. 16).
//   MERGE  (K(2^M-1) cycles) for l = 2^M-1 down to 1 the K bins of l are
//          combined most significant last, v = (v + S_jl) >> M for
//          j = K..1, giving S_l = sum_j S_jl 2^-jM (eq. 19), which is
//          written over word (1, l).
//   PH2, PH3 (2^M-1 cycles each) the two backward accumulation passes of
//          Method I over the words (1, l): S~_l, then Y = sum S~_l.
// A clearing pass of K*2^M cycles zeroes the RAM first.  The shifts are
// applied to the K*2^M bin sums instead of to the K*N operands, and each
// S_l carries only one rounding.
//
// Interface and formats are those of sp_method1: load X_i and A_i while
// idle, pulse start, and y_valid pulses with y after
// K*2^M + K*N + K(2^M-1) + 2(2^M-1) busy cycles.
// The steps and their equations follow the described method.  Only the
// algorithm is given for Method II; the RAM of K*2^M words addressed by
// {j-1, l}, the in-place merge, the clearing pass and the cycle schedule
// are this design's choices, reusing the Method I building blocks.
module sp_method2
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
  input  logic                 x_we,
  input  logic [IW-1:0]        x_waddr,
  input  logic [LX-1:0]        x_wdata,
  input  logic                 a_we,
  input  logic [IW-1:0]        a_waddr,
  input  logic [LA:0]          a_wdata,
  input  logic                 start,
  output logic                 busy,
  output sp2_phase_e           phase,
  output logic                 y_valid,
  output logic signed [LX-1:0] y
);

  localparam int unsigned JW  = $clog2(K + 1);
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1;   // bank select j-1
  localparam int unsigned RAW = KW + M;
  localparam logic [M-1:0]  LMAX  = {M{1'b1}};
  localparam logic [IW-1:0] ILAST = IW'(N - 1);
  localparam logic [JW-1:0] JTOP  = JW'(K);

  sp2_phase_e    state;
  logic [IW-1:0] i_q;
  logic [JW-1:0] j_q;      // 1..K
  logic [M-1:0]  l_q;
  logic [KW-1:0] bank_q;   // clearing pass bank counter

  // --------------------------------------------------------------- operands
  logic [LX-1:0] x_rd;
  logic [LA:0]   a_rd;

  operand_mem #(.WIDTH(LX), .DEPTH(N)) u_xmem (
    .clk, .we(x_we), .waddr(x_waddr), .wdata(x_wdata), .raddr(i_q), .rdata(x_rd)
  );
  operand_mem #(.WIDTH(LA + 1), .DEPTH(N)) u_amem (
    .clk, .we(a_we), .waddr(a_waddr), .wdata(a_wdata), .raddr(i_q), .rdata(a_rd)
  );

  logic [LA-1:0]        mag_shifted;
  logic [M-1:0]         a_ij;
  logic signed [LX-1:0] x_signed, x_star;
  always_comb begin
    mag_shifted = a_rd[LA-1:0] >> ((K - 32'(j_q)) * M);
    a_ij        = mag_shifted[M-1:0];
    x_signed    = a_rd[LA] ? -signed'(x_rd) : signed'(x_rd);
    x_star      = x_signed <<< M0;                       // step 1 (eq. 15)
  end

  // -------------------------------------------------------- partial sums
  logic                 ram_we;
  logic [RAW-1:0]       ram_addr;
  logic signed [LX-1:0] ram_wdata, ram_rdata;
  logic signed [LX-1:0] v_q, merge_sum, merge_shifted;
  logic                 acc_clr, acc_en;
  logic signed [LX-1:0] add2_in, add2_sum, add2_tau;

  logic [KW-1:0] j_bank;
  assign j_bank = KW'(32'(j_q) - 1);

  always_comb begin
    merge_sum     = ((j_q == JTOP) ? '0 : v_q) + ram_rdata;
    merge_shifted = merge_sum >>> M;
    ram_we    = 1'b0;
    ram_addr  = {KW'(0), l_q};
    ram_wdata = '0;
    acc_clr   = 1'b1;
    acc_en    = 1'b0;
    add2_in   = '0;
    unique case (state)
      SP2_CLEAR: begin
        ram_we   = 1'b1;
        ram_addr = {bank_q, l_q};
      end
      SP2_BIN: begin
        ram_we    = 1'b1;
        ram_addr  = {j_bank, a_ij};
        ram_wdata = ram_rdata + x_star;                   // step 2
      end
      SP2_MERGE: begin
        ram_addr  = {j_bank, l_q};
        ram_we    = (j_q == JW'(1));
        ram_wdata = merge_shifted;                        // step 3
      end
      SP2_PH2: begin
        ram_we    = 1'b1;
        ram_wdata = add2_sum;                             // step 4
        add2_in   = ram_rdata;
        acc_en    = 1'b1;
        acc_clr   = (l_q == M'(1));
      end
      SP2_PH3: begin
        add2_in   = ram_rdata;                            // step 5
        acc_en    = 1'b1;
        acc_clr   = 1'b0;
      end
      default: ;
    endcase
  end

  ps_ram #(.WIDTH(LX), .DEPTH(K << M)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  add2_acc #(.WIDTH(LX)) u_add2 (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en), .din(add2_in), .sum(add2_sum), .tau(add2_tau)
  );

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= SP2_IDLE;
      i_q     <= '0;
      j_q     <= JW'(1);
      l_q     <= '0;
      bank_q  <= '0;
      v_q     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      unique case (state)
        SP2_IDLE: if (start) begin
          state  <= SP2_CLEAR;
          l_q    <= '0;
          bank_q <= '0;
        end
        SP2_CLEAR: begin
          l_q <= l_q + 1'b1;
          if (l_q == LMAX) begin
            bank_q <= bank_q + 1'b1;
            if (32'(bank_q) == K - 1) begin
              state <= SP2_BIN;
              i_q   <= '0;
              j_q   <= JW'(1);
            end
          end
        end
        SP2_BIN: begin
          if (j_q == JTOP) begin
            j_q <= JW'(1);
            i_q <= i_q + 1'b1;
            if (i_q == ILAST) begin
              state <= SP2_MERGE;
              l_q   <= LMAX;
              j_q   <= JTOP;
            end
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        SP2_MERGE: begin
          v_q <= merge_shifted;
          if (j_q == JW'(1)) begin
            j_q <= JTOP;
            l_q <= l_q - 1'b1;
            if (l_q == M'(1)) begin
              state <= SP2_PH2;
              l_q   <= LMAX;
            end
          end else begin
            j_q <= j_q - 1'b1;
          end
        end
        SP2_PH2: begin
          l_q <= l_q - 1'b1;
          if (l_q == M'(1)) begin
            state <= SP2_PH3;
            l_q   <= LMAX;
          end
        end
        SP2_PH3: begin
          l_q <= l_q - 1'b1;
          if (l_q == M'(1)) begin
            state   <= SP2_IDLE;
            y       <= add2_sum;
            y_valid <= 1'b1;
          end
        end
        default: state <= SP2_IDLE;
      endcase
    end
  end

  assign phase = state;
  assign busy  = (state != SP2_IDLE);

  if (LA % K != 0) begin : g_bad_partition
    $error("sp_method2: LA (%0d) must be a multiple of K (%0d)", LA, K);
  end

endmodule
