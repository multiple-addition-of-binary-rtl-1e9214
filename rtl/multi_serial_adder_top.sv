// multi_serial_adder_top -- the multiple serial adder schemes side by side.
//
// Every scheme adds m two's-complement numbers of N bits that arrive bit
// serially and produces their sum, also bit serially, least significant
// bit first.  The sum has N + sum_ext(m) bits (sum_ext(m) is the integer
// part of log2 m, plus one), so it never overflows.  The schemes differ in
// what they do with the carries of the parallel counters that count the
// ones of each column:
//
//   c1s  class 1, one (m+c; c+1) counter, carries fed back     m = 11, (14;4)
//   c1m  class 1, limited (7;3)/(5;3) counters in two stages   m = 13
//   c1t  class 1, tree of full adders, pipelined (delta = 8)   m = 256
//   c2   class 2, feed-forward carries (13;4)(4;3)(3;2)(3;2)   m = 13
//   c3s  class 3, counter + carry-save accumulation            m = 31, (31;5)
//   c3p  class 3, counter + parallel adder accumulation        m = 15, (15;4)
//
// Each scheme has its own addend_shifter (the m input shift registers with
// sign prolongation) and its own addend input and serial sum output.  They
// share clk, rst_n and load.  load captures all addends and at the same
// edge clears every carry memory, so one pulse starts a new addition in
// every scheme.
//
// Timing: with load high at clock edge t, column k (k = 0 ...) of the
// addends is presented during the clock after edge t + k, and sum bit k of
// a scheme is valid in that same clock for delta = 0 schemes and DELTA_C1T
// clocks later for the full-adder tree.  Keep load low until the last bit
// of the longest sum (N + sum_ext(m) + delta clocks) has been taken.
//
// The m of each scheme is the one of the document's figure or table for
// that scheme; N = 8 is the addend length of its worked example.  Using one
// load for all schemes is this design's choice.
module multi_serial_adder_top
  import msa_pkg::*;
#(
  parameter int N         = 8,
  parameter int M_C1S     = 11,
  parameter int M_C1M     = 13,
  parameter int GROUP_C1M = 5,
  parameter int M_C1T     = 256,
  parameter int M_C2      = 13,
  parameter int M_C3S     = 31,
  parameter int M_C3P     = 15
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [M_C1S-1:0][N-1:0] c1s_addends,
  input  logic [M_C1M-1:0][N-1:0] c1m_addends,
  input  logic [M_C1T-1:0][N-1:0] c1t_addends,
  input  logic [M_C2-1:0][N-1:0]  c2_addends,
  input  logic [M_C3S-1:0][N-1:0] c3s_addends,
  input  logic [M_C3P-1:0][N-1:0] c3p_addends,
  output logic                    c1s_sum,
  output logic                    c1m_sum,
  output logic                    c1t_sum,
  output logic                    c2_sum,
  output logic                    c3s_sum,
  output logic                    c3p_sum
);

  logic [M_C1S-1:0] c1s_col;
  logic [M_C1M-1:0] c1m_col;
  logic [M_C1T-1:0] c1t_col;
  logic [M_C2-1:0]  c2_col;
  logic [M_C3S-1:0] c3s_col;
  logic [M_C3P-1:0] c3p_col;

  // Class 1, single counter with fed-back carries.
  addend_shifter #(.M(M_C1S), .N(N)) u_c1s_src (
    .clk(clk), .rst_n(rst_n), .load(load), .addends(c1s_addends), .col(c1s_col)
  );
  fb_counter_cell #(.N_IN(M_C1S)) u_c1s (
    .clk(clk), .rst_n(rst_n), .clear(load), .x(c1s_col), .sum(c1s_sum)
  );

  // Class 1, counters of limited size in cascaded stages.
  addend_shifter #(.M(M_C1M), .N(N)) u_c1m_src (
    .clk(clk), .rst_n(rst_n), .load(load), .addends(c1m_addends), .col(c1m_col)
  );
  class1_multistage #(.M(M_C1M), .GROUP(GROUP_C1M), .PIPE(1'b0)) u_c1m (
    .clk(clk), .rst_n(rst_n), .clear(load), .x(c1m_col), .sum(c1m_sum)
  );

  // Class 1, pipelined tree of full adders.
  addend_shifter #(.M(M_C1T), .N(N)) u_c1t_src (
    .clk(clk), .rst_n(rst_n), .load(load), .addends(c1t_addends), .col(c1t_col)
  );
  class1_fa_tree #(.M(M_C1T), .PIPE_EVERY(1)) u_c1t (
    .clk(clk), .rst_n(rst_n), .clear(load), .x(c1t_col), .sum(c1t_sum)
  );

  // Class 2, feed-forward carries.
  addend_shifter #(.M(M_C2), .N(N)) u_c2_src (
    .clk(clk), .rst_n(rst_n), .load(load), .addends(c2_addends), .col(c2_col)
  );
  class2_adder #(.M(M_C2)) u_c2 (
    .clk(clk), .rst_n(rst_n), .clear(load), .x(c2_col), .sum(c2_sum)
  );

  // Class 3, carries accumulated in carry-save form.
  addend_shifter #(.M(M_C3S), .N(N)) u_c3s_src (
    .clk(clk), .rst_n(rst_n), .load(load), .addends(c3s_addends), .col(c3s_col)
  );
  class3_csa_adder #(.M(M_C3S)) u_c3s (
    .clk(clk), .rst_n(rst_n), .clear(load), .x(c3s_col), .sum(c3s_sum)
  );

  // Class 3, carries accumulated by a parallel adder.
  addend_shifter #(.M(M_C3P), .N(N)) u_c3p_src (
    .clk(clk), .rst_n(rst_n), .load(load), .addends(c3p_addends), .col(c3p_col)
  );
  class3_cpa_adder #(.M(M_C3P)) u_c3p (
    .clk(clk), .rst_n(rst_n), .clear(load), .x(c3p_col), .sum(c3p_sum)
  );

endmodule
