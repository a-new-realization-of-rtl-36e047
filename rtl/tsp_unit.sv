// tsp_unit: multiplier-free transposed sum of products Y_i = A_i X,
// i = 0..N-1, by partitioned arithmetic.
//
// One input X is to be multiplied by N coefficients (the situation of a
// transposed transversal filter).  With X* = 2^M0 X:
//   Table phase  (2^M cycles)  the multiples X* l, l = 0 .. 2^M-1, are
//                formed by repeated addition, X* l = X* (l-1) + X*, and
//                written to RAM word l (eq. 23).
//   Output phase (K cycles per i)  the RAM is read at a_iK, a_i(K-1), ...,
//                a_i1; each word is added to the running value and the sum
//                shifted right by M bits:
//                  v_K = (X* a_iK) >> M,  v_j = (v_(j+1) + X* a_ij) >> M,
//                so v_1 = sum_j X* a_ij 2^-jM; the sign of A_i is applied
//                last and Y_i is output.
// Cost: 2^M-2 additions for the table plus K-1 per output, and no
// multiplications.
//
// Interface: load A_i (sign bit L_A, 1 = negative) through a_we/a_waddr/
// a_wdata while idle; present X on x and pulse start.  The unit samples
// x, builds the table and then delivers Y_0 .. Y_(N-1) in order, one every
// K cycles, each as a one-cycle y_valid pulse with y and its index y_idx.
// busy is high from the cycle after start to the last output.
// Formats: L_X-bit two's complement with X's binary point; right shifts
// truncate toward minus infinity, sums wrap.
// The two phases, the table built by addition and the shift-accumulate
// order j = K..1 follow the described procedure; the RAM timing, the
// registered output and the load/start interface are this design's choices.
module tsp_unit
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
  // coefficient memory load
  input  logic                 a_we,
  input  logic [IW-1:0]        a_waddr,
  input  logic [LA:0]          a_wdata,
  // control and results
  input  logic signed [LX-1:0] x,
  input  logic                 start,
  output logic                 busy,
  output tsp_phase_e           phase,
  output logic                 y_valid,
  output logic [IW-1:0]        y_idx,
  output logic signed [LX-1:0] y
);

  localparam int unsigned JW = $clog2(K + 1);
  localparam logic [M-1:0]  LMAX  = {M{1'b1}};
  localparam logic [IW-1:0] ILAST = IW'(N - 1);
  localparam logic [JW-1:0] JTOP  = JW'(K);

  tsp_phase_e state;
  logic [IW-1:0] i_q;
  logic [JW-1:0] j_q;
  logic [M-1:0]  l_q;
  logic signed [LX-1:0] xs_q;    // X* = 2^M0 X, sampled at start
  logic signed [LX-1:0] acc_q;   // table multiple (table phase) / v_(j+1) (output phase)

  // ------------------------------------------------------ coefficient store
  logic [LA:0] a_rd;
  operand_mem #(.WIDTH(LA + 1), .DEPTH(N)) u_amem (
    .clk, .we(a_we), .waddr(a_waddr), .wdata(a_wdata), .raddr(i_q), .rdata(a_rd)
  );

  logic [LA-1:0] mag_shifted;
  logic [M-1:0]  a_ij;
  always_comb begin
    mag_shifted = a_rd[LA-1:0] >> ((K - 32'(j_q)) * M);
    a_ij        = mag_shifted[M-1:0];
  end

  // ------------------------------------------------------------ table RAM
  logic                 ram_we;
  logic [M-1:0]         ram_addr;
  logic signed [LX-1:0] ram_rdata;

  assign ram_we   = (state == TSP_TABLE);
  assign ram_addr = (state == TSP_TABLE) ? l_q : a_ij;

  ps_ram #(.WIDTH(LX), .DEPTH(1 << M)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(acc_q), .rdata(ram_rdata)
  );

  // ------------------------------------------------------ adder + shifter
  logic signed [LX-1:0] add_a, add_out, shifted, signed_out;
  always_comb begin
    if (state == TSP_TABLE) begin
      add_a   = xs_q;                                // X* l = X* (l-1) + X*
    end else begin
      add_a   = (j_q == JTOP) ? '0 : acc_q;          // v_(j+1), zero for j = K
    end
    add_out    = add_a + ((state == TSP_TABLE) ? acc_q : ram_rdata);
    shifted    = add_out >>> M;
    signed_out = a_rd[LA] ? -shifted : shifted;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= TSP_IDLE;
      i_q     <= '0;
      j_q     <= JTOP;
      l_q     <= '0;
      xs_q    <= '0;
      acc_q   <= '0;
      y_valid <= 1'b0;
      y_idx   <= '0;
      y       <= '0;
    end else begin
      y_valid <= 1'b0;
      unique case (state)
        TSP_IDLE: if (start) begin
          state <= TSP_TABLE;
          xs_q  <= x <<< M0;
          acc_q <= '0;
          l_q   <= '0;
        end
        TSP_TABLE: begin
          acc_q <= add_out;
          l_q   <= l_q + 1'b1;
          if (l_q == LMAX) begin
            state <= TSP_OUT;
            i_q   <= '0;
            j_q   <= JTOP;
          end
        end
        TSP_OUT: begin
          acc_q <= shifted;
          if (j_q == JW'(1)) begin
            y_valid <= 1'b1;
            y_idx   <= i_q;
            y       <= signed_out;
            j_q     <= JTOP;
            i_q     <= i_q + 1'b1;
            if (i_q == ILAST) state <= TSP_IDLE;
          end else begin
            j_q <= j_q - 1'b1;
          end
        end
        default: state <= TSP_IDLE;
      endcase
    end
  end

  assign phase = state;
  assign busy  = (state != TSP_IDLE);

  if (LA % K != 0) begin : g_bad_partition
    $error("tsp_unit: LA (%0d) must be a multiple of K (%0d)", LA, K);
  end

endmodule
