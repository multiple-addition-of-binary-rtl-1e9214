// tb_class1_multistage -- self-checking testbench for class1_multistage.
//
// Runs the partitioned class 1 adder at its default (13 addends, groups of 5),
// with inter-stage memories (one clock later), and at 40 addends in groups of
// 3, which takes three stages.
// For every operation the testbench raises clear for one clock, then drives
// one column of the addends per clock, LSB first, repeating each addend's
// sign bit after its N bits.  Sum bit k is expected DELTA clocks after column
// k; the expected value is the two's-complement sum of the addends computed
// here with integer arithmetic.  Operations are random addends plus corner
// cases: all addends -1 (every column all ones, the counters' largest
// count), all at the most negative value and all at the most positive.
// Each check compares one sum bit at its exact clock, so the latency is
// checked too.
module tb_class1_multistage;
  import msa_pkg::*;

  localparam int N    = 8;
  localparam int NOPS = 300;

  logic clk;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  int checks = 0;
  int failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [13-1:0] x_def;
  logic sum_def;
  class1_multistage  u_def (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_def), .sum(sum_def)
  );
  logic [13-1:0] x_pipe;
  logic sum_pipe;
  class1_multistage #(.M(13), .GROUP(5), .PIPE(1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_pipe), .sum(sum_pipe)
  );
  logic [40-1:0] x_m40;
  logic sum_m40;
  class1_multistage #(.M(40), .GROUP(3), .PIPE(1)) u_m40 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_m40), .sum(sum_m40)
  );


  // Column t of addend a (sign prolongation past bit N-1).
  function automatic logic colbit(input logic [N-1:0] a, input int t);
    return (t < N) ? a[t] : a[N-1];
  endfunction

  // Runs one addition on dut def; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_def(input int kind);
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
    x_def = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 13; i++) x_def[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_def !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL def op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_def, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut pipe; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_pipe(input int kind);
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
    x_pipe = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 1; t++) begin
      for (int i = 0; i < 13; i++) x_pipe[i] = colbit(a[i], t);
      #1;
      if (t >= 1) begin
        checks++;
        if (sum_pipe !== exp_sum[t - 1]) begin
          failures++;
          if (failures < 10)
            $display("FAIL pipe op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 1, sum_pipe, exp_sum[t - 1], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut m40; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_m40(input int kind);
    logic [N-1:0] a [40];
    longint exp_sum;
    int nb;
    nb = N + sum_ext(40);
    exp_sum = 0;
    for (int i = 0; i < 40; i++) begin
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
    x_m40 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 3; t++) begin
      for (int i = 0; i < 40; i++) x_m40[i] = colbit(a[i], t);
      #1;
      if (t >= 3) begin
        checks++;
        if (sum_m40 !== exp_sum[t - 3]) begin
          failures++;
          if (failures < 10)
            $display("FAIL m40 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 3, sum_m40, exp_sum[t - 3], exp_sum);
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
      run_pipe(op < 3 ? op + 1 : 0);
      run_m40(op < 3 ? op + 1 : 0);

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
