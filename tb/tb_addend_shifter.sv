// tb_addend_shifter -- self-checking testbench for addend_shifter.
//
// Loads 13 random 8-bit addends (the default size), then checks for 20
// clocks that column t carries bit t of every addend and, from t = 8 on,
// its sign bit.  A new load is issued right after, so back-to-back loads are
// covered.
module tb_addend_shifter;
  localparam int M = 13;
  localparam int N = 8;

  logic clk;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic [M-1:0][N-1:0] addends;
  logic [M-1:0] col;
  int checks = 0;
  int failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  addend_shifter u_dut (.clk(clk), .rst_n(rst_n), .load(load), .addends(addends), .col(col));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0][N-1:0] held;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 200; op++) begin
      for (int i = 0; i < M; i++) addends[i] = N'($urandom);
      held = addends;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      addends = '0;
      for (int t = 0; t < 20; t++) begin
        for (int i = 0; i < M; i++) begin
          checks++;
          if (col[i] !== held[i][(t < N) ? t : N - 1]) begin
            failures++;
            if (failures < 10) $display("FAIL addend %0d column %0d", i, t);
          end
        end
        if (t < 19) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
