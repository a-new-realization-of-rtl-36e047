// pa_sp_tsp_top: the partitioned-arithmetic processors side by side.
//
//  * sp1_*  sum of products Y = sum A_i X_i, Method I (per-operand shifts,
//           one 2^M-word partial-sum RAM) - the main realization;
//  * sp2_*  sum of products, Method II (bins per field position, shifts
//           applied to the bin sums);
//  * tsp_*  transposed sum of products Y_i = A_i X (table of multiples of
//           X, shift-accumulate per coefficient).
// The three share only clock and reset; each keeps its own memories and
// handshake (see the submodules for timing).  All three use the same sizes:
// N products, coefficients of 1 sign + LA magnitude bits cut into K fields,
// LX-bit data, coefficient scale 2^M0.  Grouping them in one top is this
// design's choice; each unit works on its own.
module pa_sp_tsp_top
  import pa_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned LA = DEF_LA,
  parameter int unsigned K  = DEF_K,
  parameter int unsigned LX = DEF_LX,
  parameter int unsigned M0 = DEF_M0,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Method I sum of products
  input  logic                 sp1_x_we,
  input  logic [IW-1:0]        sp1_x_waddr,
  input  logic [LX-1:0]        sp1_x_wdata,
  input  logic                 sp1_a_we,
  input  logic [IW-1:0]        sp1_a_waddr,
  input  logic [LA:0]          sp1_a_wdata,
  input  logic                 sp1_start,
  output logic                 sp1_busy,
  output sp_phase_e            sp1_phase,
  output logic                 sp1_y_valid,
  output logic signed [LX-1:0] sp1_y,
  // Method II sum of products
  input  logic                 sp2_x_we,
  input  logic [IW-1:0]        sp2_x_waddr,
  input  logic [LX-1:0]        sp2_x_wdata,
  input  logic                 sp2_a_we,
  input  logic [IW-1:0]        sp2_a_waddr,
  input  logic [LA:0]          sp2_a_wdata,
  input  logic                 sp2_start,
  output logic                 sp2_busy,
  output sp2_phase_e           sp2_phase,
  output logic                 sp2_y_valid,
  output logic signed [LX-1:0] sp2_y,
  // transposed sum of products
  input  logic                 tsp_a_we,
  input  logic [IW-1:0]        tsp_a_waddr,
  input  logic [LA:0]          tsp_a_wdata,
  input  logic signed [LX-1:0] tsp_x,
  input  logic                 tsp_start,
  output logic                 tsp_busy,
  output tsp_phase_e           tsp_phase,
  output logic                 tsp_y_valid,
  output logic [IW-1:0]        tsp_y_idx,
  output logic signed [LX-1:0] tsp_y
);

  sp_method1 #(.N(N), .LA(LA), .K(K), .LX(LX), .M0(M0)) u_sp1 (
    .clk, .rst_n,
    .x_we(sp1_x_we), .x_waddr(sp1_x_waddr), .x_wdata(sp1_x_wdata),
    .a_we(sp1_a_we), .a_waddr(sp1_a_waddr), .a_wdata(sp1_a_wdata),
    .start(sp1_start), .busy(sp1_busy), .phase(sp1_phase),
    .y_valid(sp1_y_valid), .y(sp1_y)
  );

  sp_method2 #(.N(N), .LA(LA), .K(K), .LX(LX), .M0(M0)) u_sp2 (
    .clk, .rst_n,
    .x_we(sp2_x_we), .x_waddr(sp2_x_waddr), .x_wdata(sp2_x_wdata),
    .a_we(sp2_a_we), .a_waddr(sp2_a_waddr), .a_wdata(sp2_a_wdata),
    .start(sp2_start), .busy(sp2_busy), .phase(sp2_phase),
    .y_valid(sp2_y_valid), .y(sp2_y)
  );

  tsp_unit #(.N(N), .LA(LA), .K(K), .LX(LX), .M0(M0)) u_tsp (
    .clk, .rst_n,
    .a_we(tsp_a_we), .a_waddr(tsp_a_waddr), .a_wdata(tsp_a_wdata),
    .x(tsp_x), .start(tsp_start), .busy(tsp_busy), .phase(tsp_phase),
    .y_valid(tsp_y_valid), .y_idx(tsp_y_idx), .y(tsp_y)
  );

endmodule
