// tb_delay_line -- self-checking testbench for delay_line.
//
// Feeds random bits into chains of 1 and 3 memory cells and compares each
// output with the input of 1 or 3 clocks before, kept in a history of the
// testbench's own.  Also checks that clear empties the chain.
module tb_delay_line;
  logic clk;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic d = 1'b0;
  logic q1, q3;
  logic [3:0] hist;  // hist[k]: input of k+1 clocks ago
  int checks = 0;
  int failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  delay_line              u_d1 (.clk(clk), .rst_n(rst_n), .clear(clear), .d(d), .q(q1));
  delay_line #(.D(3))     u_d3 (.clk(clk), .rst_n(rst_n), .clear(clear), .d(d), .q(q3));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      // Every 50 clocks clear the chains: afterwards they hold zeros.
      clear = (t % 50 == 49);
      d = 1'($urandom);
      #1;
      if (t >= 3) begin
        check(q1, hist[0], "D=1");
        check(q3, hist[2], "D=3");
      end
      @(negedge clk);
      hist = clear ? '0 : {hist[2:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
