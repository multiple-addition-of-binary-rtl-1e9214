// tb_class3_csa_adder -- self-checking testbench for class3_csa_adder.
//
// Runs the carry-save class 3 adder at its default (31 addends, (31;5)
// counter), at 256 addends and at 2.
// For every operation the testbench raises clear for one clock, then drives
// one column of the addends per clock, LSB first, repeating each addend's
// sign bit after its N bits.  Sum bit k is expected DELTA clocks after column
// k; the expected value is the two's-complement sum of the addends computed
// here with integer arithmetic.  Operations are random addends plus corner
// cases: all addends -1 (every column all ones, the counters' largest
// count), all at the most negative value and all at the most positive.
// Each check compares one sum bit at its exact clock, so the latency is
// checked too.
module tb_class3_csa_adder;
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

  logic [31-1:0] x_def;
  logic sum_def;
  class3_csa_adder  u_def (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_def), .sum(sum_def)
  );
  logic [256-1:0] x_m256;
  logic sum_m256;
  class3_csa_adder #(.M(256)) u_m256 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_m256), .sum(sum_m256)
  );
  logic [2-1:0] x_m2;
  logic sum_m2;
  class3_csa_adder #(.M(2)) u_m2 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .x(x_m2), .sum(sum_m2)
  );


  // Column t of addend a (sign prolongation past bit N-1).
  function automatic logic colbit(input logic [N-1:0] a, input int t);
    return (t < N) ? a[t] : a[N-1];
  endfunction

  // Runs one addition on dut def; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_def(input int kind);
    logic [N-1:0] a [31];
    longint exp_sum;
    int nb;
    nb = N + sum_ext(31);
    exp_sum = 0;
    for (int i = 0; i < 31; i++) begin
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
      for (int i = 0; i < 31; i++) x_def[i] = colbit(a[i], t);
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
  // Runs one addition on dut m256; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_m256(input int kind);
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
    x_m256 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 256; i++) x_m256[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_m256 !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL m256 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_m256, exp_sum[t - 0], exp_sum);
        end
      end
      @(negedge clk);
    end
  endtask
  // Runs one addition on dut m2; kind 0 random, 1 all -1, 2 all min, 3 all max.
  task automatic run_m2(input int kind);
    logic [N-1:0] a [2];
    longint exp_sum;
    int nb;
    nb = N + sum_ext(2);
    exp_sum = 0;
    for (int i = 0; i < 2; i++) begin
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
    x_m2 = '1;  // columns seen while clearing must not matter
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < nb + 0; t++) begin
      for (int i = 0; i < 2; i++) x_m2[i] = colbit(a[i], t);
      #1;
      if (t >= 0) begin
        checks++;
        if (sum_m2 !== exp_sum[t - 0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL m2 op kind %0d bit %0d: got %b expected %b (sum %0d)",
                     kind, t - 0, sum_m2, exp_sum[t - 0], exp_sum);
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
      run_m256(op < 3 ? op + 1 : 0);
      run_m2(op < 3 ? op + 1 : 0);

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
