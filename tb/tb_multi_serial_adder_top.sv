// tb_multi_serial_adder_top -- end-to-end testbench for multi_serial_adder_top.
//
// Runs the top with all parameters at their defaults: six serial multiple
// adders of 11, 13, 256, 13, 31 and 15 addends of 8 bits.  Each operation
// loads new addends into every scheme with one load pulse and then, for
// 8 + 9 + 8 clocks, compares every scheme's serial sum output with the bits
// of the two's-complement sum computed here.  Sum bit k of a scheme is
// expected k clocks after load for the unpipelined schemes and k + 8 clocks
// after load for the full-adder tree, so the latencies are checked bit by
// bit.  Loads follow each other with no idle clock.
//
// Mechanisms counted (a count of zero is a failure):
//   neg_sums      additions with a negative sum: the sign prolongation of
//                 the addend registers is needed to get the upper sum bits
//   sat_columns   additions with every addend -1: every column is all ones
//                 and the counters reach their largest count
//   dirty_clears  loads that follow an all-ones addition, whose carry
//                 memories are still full when load clears them
//   ext_bits      sum bits checked above the addends' N bits
module tb_multi_serial_adder_top;
  import msa_pkg::*;

  localparam int N     = 8;
  localparam int NOPS  = 60;
  localparam int NSCH  = 6;
  localparam int DELTA_C1T = 8;
  localparam int M_C1S = 11, M_C1M = 13, M_C1T = 256, M_C2 = 13, M_C3S = 31, M_C3P = 15;
  localparam int MMAX  = 256;
  localparam int NCYC  = N + sum_ext(MMAX) + DELTA_C1T;

  logic clk;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic [M_C1S-1:0][N-1:0] c1s_addends;
  logic [M_C1M-1:0][N-1:0] c1m_addends;
  logic [M_C1T-1:0][N-1:0] c1t_addends;
  logic [M_C2-1:0][N-1:0]  c2_addends;
  logic [M_C3S-1:0][N-1:0] c3s_addends;
  logic [M_C3P-1:0][N-1:0] c3p_addends;
  logic c1s_sum, c1m_sum, c1t_sum, c2_sum, c3s_sum, c3p_sum;

  int checks = 0;
  int failures = 0;
  int neg_sums = 0, sat_columns = 0, dirty_clears = 0, ext_bits = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  multi_serial_adder_top u_top (
    .clk(clk), .rst_n(rst_n), .load(load),
    .c1s_addends(c1s_addends), .c1m_addends(c1m_addends), .c1t_addends(c1t_addends),
    .c2_addends(c2_addends), .c3s_addends(c3s_addends), .c3p_addends(c3p_addends),
    .c1s_sum(c1s_sum), .c1m_sum(c1m_sum), .c1t_sum(c1t_sum),
    .c2_sum(c2_sum), .c3s_sum(c3s_sum), .c3p_sum(c3p_sum)
  );

  const int msch[NSCH]     = '{M_C1S, M_C1M, M_C1T, M_C2, M_C3S, M_C3P};
  const int dsch[NSCH]     = '{0, 0, DELTA_C1T, 0, 0, 0};
  const string names[NSCH] = '{"c1s", "c1m", "c1t", "c2", "c3s", "c3p"};

  logic [N-1:0] a [NSCH][MMAX];
  longint exp_sum [NSCH];

  function automatic logic out_bit(input int s);
    case (s)
      0: return c1s_sum;
      1: return c1m_sum;
      2: return c1t_sum;
      3: return c2_sum;
      4: return c3s_sum;
      default: return c3p_sum;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kind, prev_kind;
    prev_kind = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      // 0 random, 1 all -1, 2 all most negative, 3 all most positive,
      // 4 random negative
      kind = (op < 4) ? op + 1 : ((op % 5 == 4) ? 1 : 0);
      if (op % 7 == 6) kind = 4;
      for (int s = 0; s < NSCH; s++) begin
        exp_sum[s] = 0;
        for (int i = 0; i < msch[s]; i++) begin
          case (kind)
            1: a[s][i] = '1;
            2: a[s][i] = {1'b1, {(N-1){1'b0}}};
            3: a[s][i] = {1'b0, {(N-1){1'b1}}};
            4: a[s][i] = {1'b1, (N-1)'($urandom)};
            default: a[s][i] = N'($urandom);
          endcase
          exp_sum[s] += longint'($signed(a[s][i]));
        end
        if (exp_sum[s] < 0) neg_sums++;
      end
      for (int i = 0; i < M_C1S; i++) c1s_addends[i] = a[0][i];
      for (int i = 0; i < M_C1M; i++) c1m_addends[i] = a[1][i];
      for (int i = 0; i < M_C1T; i++) c1t_addends[i] = a[2][i];
      for (int i = 0; i < M_C2;  i++) c2_addends[i]  = a[3][i];
      for (int i = 0; i < M_C3S; i++) c3s_addends[i] = a[4][i];
      for (int i = 0; i < M_C3P; i++) c3p_addends[i] = a[5][i];
      if (kind == 1) sat_columns++;
      if (prev_kind == 1) dirty_clears++;
      prev_kind = kind;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int t = 0; t < NCYC; t++) begin
        #1;
        for (int s = 0; s < NSCH; s++) begin
          int k;
          k = t - dsch[s];
          if (k >= 0 && k < N + sum_ext(msch[s])) begin
            checks++;
            if (k >= N) ext_bits++;
            if (out_bit(s) !== exp_sum[s][k]) begin
              failures++;
              if (failures < 10)
                $display("FAIL %s op %0d bit %0d: got %b expected %b (sum %0d)",
                         names[s], op, k, out_bit(s), exp_sum[s][k], exp_sum[s]);
            end
          end
        end
        if (t < NCYC - 1) @(negedge clk);
      end
    end
    $display("neg_sums=%0d sat_columns=%0d dirty_clears=%0d ext_bits=%0d",
             neg_sums, sat_columns, dirty_clears, ext_bits);
    if (neg_sums == 0)     begin failures++; $display("FAIL no negative sum"); end
    if (sat_columns == 0)  begin failures++; $display("FAIL no all-ones column"); end
    if (dirty_clears == 0) begin failures++; $display("FAIL no clear of full carry memories"); end
    if (ext_bits == 0)     begin failures++; $display("FAIL no sum bit above N"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
