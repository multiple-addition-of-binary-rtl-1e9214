// tb_table_a -- self-checking testbench for class1_multistage.
//
// Workload: the class 1 adders for 256 addends compared in the document's
// table of feed-back-carry adders.  One instance per counter size: groups of
// 5 ((7;3) counters), 11 ((14;4)/(15;4)), 26 ((30;5)/(31;5)), 57
// ((62;6)/(63;6)), 120 ((126;7)/(127;7)) and 248 ((255;8)), plus the single
// (264;9) counter and the 255-full-adder tree.  Each adds the same kind of
// 8-bit addends.
// For every operation the testbench raises clear for one clock, then drives
// one column of the addends per clock, LSB first, repeating each addend's
// sign bit after its N bits.  Sum bit k is expected DELTA clocks after column
// k; the expected value is the two's-complement sum of the addends computed
// here with integer arithmetic.  Operations are random addends plus corner
// cases: all addends -1 (every column all ones, the counters' largest
// count), all at the most negative value and all at the most positive.
// Each check compares one sum bit at its exact clock, so the latency is
// checked too.
module tb_table_a;
  import msa_pkg::*;

  localparam int N    = 8;
  localparam int NOPS = 60;

  logic clk;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  int checks = 0;
  int failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [256-1:0] x_g5;
  logic sum_g5;
  class1_multistage #(.M(256), .GROUP(5)) u_g5 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_g5), .sum(sum_g5)
  );
  logic [256-1:0] x_g11;
  logic sum_g11;
  class1_multistage #(.M(256), .GROUP(11)) u_g11 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_g11), .sum(sum_g11)
  );
  logic [256-1:0] x_g26;
  logic sum_g26;
  class1_multistage #(.M(256), .GROUP(26)) u_g26 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_g26), .sum(sum_g26)
  );
  logic [256-1:0] x_g57;
  logic sum_g57;
  class1_multistage #(.M(256), .GROUP(57)) u_g57 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_g57), .sum(sum_g57)
  );
  logic [256-1:0] x_g120;
  logic sum_g120;
  class1_multistage #(.M(256), .GROUP(120)) u_g120 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_g120), .sum(sum_g120)
  );
  logic [256-1:0] x_g248;
  logic sum_g248;
  class1_multistage #(.M(256), .GROUP(248)) u_g248 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_g248), .sum(sum_g248)
  );
  logic [256-1:0] x_single;
  logic sum_single;
  fb_counter_cell #(.N_IN(256)) u_single (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_single), .sum(sum_single)
  );
  logic [256-1:0] x_fa;
  logic sum_fa;
  class1_fa_tree  u_fa (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_fa), .sum(sum_fa)
  );


  // Column t of addend a (sign prolongation past bit N-1).
  function automatic logic colbit(input logic [N-1:0] a, input int t);
    return (t < N) ? a[t] : a[N-1];
  endfunction

  // Runs one addition on dut g5; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_g5(input int kind);
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
    x_g5 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 256; i++) x_g5[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_g5 !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL g5 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_g5, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut g11; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_g11(input int kind);
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
    x_g11 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 256; i++) x_g11[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_g11 !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL g11 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_g11, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut g26; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_g26(input int kind);
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
    x_g26 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 256; i++) x_g26[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_g26 !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL g26 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_g26, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut g57; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_g57(input int kind);
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
    x_g57 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 256; i++) x_g57[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_g57 !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL g57 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_g57, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut g120; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_g120(input int kind);
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
    x_g120 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 256; i++) x_g120[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_g120 !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL g120 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_g120, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut g248; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_g248(input int kind);
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
    x_g248 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 256; i++) x_g248[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_g248 !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL g248 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_g248, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut single; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_single(input int kind);
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
    x_single = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 256; i++) x_single[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_single !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL single op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_single, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut fa; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_fa(input int kind);
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
    x_fa = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 8; t++) begin
      for (int i = 0; i < 256; i++) x_fa[i] = colbit(a[i], t);
      #1;
      if (t >= 8) begin
        checks++;
        if (sum_fa !== exp_sum[t - 8]) begin
          failures++;
          if (failures < 10)
            $display("FAIL fa op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 8, sum_fa, exp_sum[t - 8], exp_sum);
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
      run_g5(op < 3 ? op + 1 : 0);
      run_g11(op < 3 ? op + 1 : 0);
      run_g26(op < 3 ? op + 1 : 0);
      run_g57(op < 3 ? op + 1 : 0);
      run_g120(op < 3 ? op + 1 : 0);
      run_g248(op < 3 ? op + 1 : 0);
      run_single(op < 3 ? op + 1 : 0);
      run_fa(op < 3 ? op + 1 : 0);

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
