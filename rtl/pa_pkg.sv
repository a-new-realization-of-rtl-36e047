// pa_pkg: types and defaults shared by the partitioned-arithmetic
// sum-of-products (SP) and transposed sum-of-products (TSP) processors.
//
// Number formats used throughout:
//  * A coefficient A_i is sign-magnitude, L_A+1 bits: bit L_A is the sign
//    (1 = negative, as in the worked 8-tap example), bits L_A-1..0 the
//    magnitude.  The magnitude is cut into K partial bit streams a_ij of
//    M bits each (L_A = K*M); a_i1 is the most significant field, with
//    weight 2^(M0-M), a_ij has weight 2^(M0-jM).
//  * Signal values X and every internal partial sum are L_X-bit two's
//    complement words sharing one binary point; a shift by 2^-M is an
//    arithmetic right shift (truncation toward minus infinity).
// The default sizes (L_A = 12, L_X = 20, K = 2, N = 100, M0 = 0) are the
// numerical examples the design was dimensioned for.
package pa_pkg;

  // Default sizes.
  localparam int unsigned DEF_N   = 100; // SP / TSP size
  localparam int unsigned DEF_LA  = 12;  // coefficient magnitude bits
  localparam int unsigned DEF_K   = 2;   // number of partial bit streams
  localparam int unsigned DEF_LX  = 20;  // internal data wordlength
  localparam int unsigned DEF_M0  = 0;   // exponent of the coefficient scale

  // Where the partial-sum RAM takes its write data from (switch SW3).
  typedef enum logic [1:0] {
    SW3_OFF  = 2'd0,  // no write
    SW3_ADD1 = 2'd1,  // side 1: output of ADD1 (phase 1)
    SW3_ADD2 = 2'd2,  // side 2: output of ADD2 (phase 2)
    SW3_ZERO = 2'd3   // write zero (clearing pass before phase 1)
  } sw3_e;

  // Switch settings of the Method I datapath.
  typedef struct packed {
    logic sw1_seq;   // SW1: 0 = side 1 (a_ij addresses), 1 = side 2 (sequential address)
    logic sw2_add2;  // SW2: 0 = side 1 (RAM out to ADD1), 1 = side 2 (RAM out to ADD2)
    sw3_e sw3;       // SW3: source of the RAM write data
    logic sw4_on;    // SW4: ADD2 output to the SP output
  } sp_sw_t;

  // Phases of the Method I sequence.
  typedef enum logic [2:0] {
    SP_IDLE  = 3'd0,
    SP_CLEAR = 3'd1,  // zero the partial-sum RAM
    SP_PH1   = 3'd2,  // S_l = sum of X~*_ij with a_ij = l      (eq. 7)
    SP_PH2   = 3'd3,  // S~_m = S~_(m+1) + S_m, written back     (eq. 10)
    SP_PH3   = 3'd4   // Y = sum of S~_m                         (eq. 11)
  } sp_phase_e;

  // Phases of the transposed sum-of-products processor.
  typedef enum logic [1:0] {
    TSP_IDLE  = 2'd0,
    TSP_TABLE = 2'd1,  // X* l written to RAM word l, l = 0 .. 2^M-1 (eq. 23)
    TSP_OUT   = 2'd2   // per i: K reads at a_ij, shift-accumulate, sign
  } tsp_phase_e;

  // Phases of the Method II sum-of-products processor.
  typedef enum logic [2:0] {
    SP2_IDLE  = 3'd0,
    SP2_CLEAR = 3'd1,  // zero the K x 2^M partial-sum words
    SP2_BIN   = 3'd2,  // S_jl = sum of X*_i with a_ij = l        (eq. 16)
    SP2_MERGE = 3'd3,  // S_l = sum_j S_jl 2^-jM                   (eq. 19)
    SP2_PH2   = 3'd4,  // S~_m = S~_(m+1) + S_m, written back      (eq. 10)
    SP2_PH3   = 3'd5   // Y = sum of S~_m                          (eq. 11)
  } sp2_phase_e;

endpackage
