// tb_class1_fa_tree -- self-checking testbench for class1_fa_tree.
//
// Runs the full-adder tree at its default (256 addends, pipelined, 8 stages
// so 8 clocks of latency), at 13 addends (odd counts passed along), at 13
// addends without pipeline memories, and with memories only every 2nd stage
// (13 addends, latency 2) and every 3rd stage (256 addends, latency 2).
// For every operation the testbench raises clear for one clock, then drives
// one column of the addends per clock, LSB first, repeating each addend's
// sign bit after its N bits.  Sum bit k is expected DELTA clocks after column
// k; the expected value is the two's-complement sum of the addends computed
// here with integer arithmetic.  Operations are random addends plus corner
// cases: all addends -1 (every column all ones, the counters' largest
// count), all at the most negative value and all at the most positive.
// Each check compares one sum bit at its exact clock, so the latency is
// checked too.
module tb_class1_fa_tree;
  import msa_pkg::*;

  localparam int N    = 8;
  localparam int NOPS = 200;

  logic clk;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  int checks = 0;
  int failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [256-1:0] x_def;
  logic sum_def;
  class1_fa_tree  u_def (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_def), .sum(sum_def)
  );
  logic [13-1:0] x_m13;
  logic sum_m13;
  class1_fa_tree #(.M(13), .PIPE_EVERY(1)) u_m13 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_m13), .sum(sum_m13)
  );
  logic [13-1:0] x_m13c;
  logic sum_m13c;
  class1_fa_tree #(.M(13), .PIPE_EVERY(0)) u_m13c (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_m13c), .sum(sum_m13c)
  );
  logic [13-1:0] x_m13e2;
  logic sum_m13e2;
  class1_fa_tree #(.M(13), .PIPE_EVERY(2)) u_m13e2 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_m13e2), .sum(sum_m13e2)
  );
  logic [256-1:0] x_m256e3;
  logic sum_m256e3;
  class1_fa_tree #(.M(256), .PIPE_EVERY(3)) u_m256e3 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_m256e3), .sum(sum_m256e3)
  );


  // Column t of addend a (sign prolongation past bit N-1).
  function automatic logic colbit(input logic [N-1:0] a, input int t);
    return (t < N) ? a[t] : a[N-1];
  endfunction

  // Runs one addition on dut def; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_def(input int kind);
    logic [N-1:0] a [256];
    longint exp_sum;
    int nb;
    nb = N + sum_ext(256);
    exp_sum = 0;
    for (int i = 0; i < 256; i++) begin
      case (kind)
        1: a[i] = '1;
        2: a[i] = {1'b1, {(N-1){1'b0}}};
        3: a[i] = {1'b0, {(N-1){1'b1}}};
        default: a[i] = N'($urandom);
      endcase
      exp_sum += longint'($signed(a[i]));
    end
    @(negedge clk);
    clear = 1'b1;
    x_def = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 8; t++) begin
      for (int i = 0; i < 256; i++) x_def[i] = colbit(a[i], t);
      #1;
      if (t >= 8) begin
        checks++;
        if (sum_def !== exp_sum[t - 8]) begin
          failures++;
          if (failures < 10)
            $display("FAIL def op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 8, sum_def, exp_sum[t - 8], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut m13; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_m13(input int kind);
    logic [N-1:0] a [13];
    longint exp_sum;
    int nb;
    nb = N + sum_ext(13);
    exp_sum = 0;
    for (int i = 0; i < 13; i++) begin
      case (kind)
        1: a[i] = '1;
        2: a[i] = {1'b1, {(N-1){1'b0}}};
        3: a[i] = {1'b0, {(N-1){1'b1}}};
        default: a[i] = N'($urandom);
      endcase
      exp_sum += longint'($signed(a[i]));
    end
    @(negedge clk);
    clear = 1'b1;
    x_m13 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 4; t++) begin
      for (int i = 0; i < 13; i++) x_m13[i] = colbit(a[i], t);
      #1;
      if (t >= 4) begin
        checks++;
        if (sum_m13 !== exp_sum[t - 4]) begin
          failures++;
          if (failures < 10)
            $display("FAIL m13 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 4, sum_m13, exp_sum[t - 4], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut m13c; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_m13c(input int kind);
    logic [N-1:0] a [13];
    longint exp_sum;
    int nb;
    nb = N + sum_ext(13);
    exp_sum = 0;
    for (int i = 0; i < 13; i++) begin
      case (kind)
        1: a[i] = '1;
        2: a[i] = {1'b1, {(N-1){1'b0}}};
        3: a[i] = {1'b0, {(N-1){1'b1}}};
        default: a[i] = N'($urandom);
      endcase
      exp_sum += longint'($signed(a[i]));
    end
    @(negedge clk);
    clear = 1'b1;
    x_m13c = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 13; i++) x_m13c[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_m13c !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL m13c op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_m13c, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut m13e2; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_m13e2(input int kind);
    logic [N-1:0] a [13];
    longint exp_sum;
    int nb;
    nb = N + sum_ext(13);
    exp_sum = 0;
    for (int i = 0; i < 13; i++) begin
      case (kind)
        1: a[i] = '1;
        2: a[i] = {1'b1, {(N-1){1'b0}}};
        3: a[i] = {1'b0, {(N-1){1'b1}}};
        default: a[i] = N'($urandom);
      endcase
      exp_sum += longint'($signed(a[i]));
    end
    @(negedge clk);
    clear = 1'b1;
    x_m13e2 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 2; t++) begin
      for (int i = 0; i < 13; i++) x_m13e2[i] = colbit(a[i], t);
      #1;
      if (t >= 2) begin
        checks++;
        if (sum_m13e2 !== exp_sum[t - 2]) begin
          failures++;
          if (failures < 10)
            $display("FAIL m13e2 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 2, sum_m13e2, exp_sum[t - 2], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut m256e3; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_m256e3(input int kind);
    logic [N-1:0] a [256];
    longint exp_sum;
    int nb;
    nb = N + sum_ext(256);
    exp_sum = 0;
    for (int i = 0; i < 256; i++) begin
      case (kind)
        1: a[i] = '1;
        2: a[i] = {1'b1, {(N-1){1'b0}}};
        3: a[i] = {1'b0, {(N-1){1'b1}}};
        default: a[i] = N'($urandom);
      endcase
      exp_sum += longint'($signed(a[i]));
    end
    @(negedge clk);
    clear = 1'b1;
    x_m256e3 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 2; t++) begin
      for (int i = 0; i < 256; i++) x_m256e3[i] = colbit(a[i], t);
      #1;
      if (t >= 2) begin
        checks++;
        if (sum_m256e3 !== exp_sum[t - 2]) begin
          failures++;
          if (failures < 10)
            $display("FAIL m256e3 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 2, sum_m256e3, exp_sum[t - 2], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask


  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      run_def(op < 3 ? op + 1 : 0);
      run_m13(op < 3 ? op + 1 : 0);
      run_m13c(op < 3 ? op + 1 : 0);
      run_m13e2(op < 3 ? op + 1 : 0);
      run_m256e3(op < 3 ? op + 1 : 0);

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
