// tb_par_counter -- self-checking testbench for par_counter.
//
// Applies all 128 input patterns to the default (7;3) counter, all 8 to a
// (3;2) counter (a full adder), and random patterns to the (264;9) counter a
// single-counter class 1 adder for 256 addends needs.  The expected count is
// obtained by testing the input bits one at a time.  The checks also use the
// output widths that msa_pkg::cnt_bits gives for these sizes.
module tb_par_counter;
  import msa_pkg::*;

  logic [6:0]   x7;
  logic [2:0]   y7;
  logic [2:0]   x3;
  logic [1:0]   y3;
  logic [263:0] xb;
  logic [8:0]   yb;
  int checks = 0;
  int failures = 0;

  par_counter                   u_c7 (.x(x7), .y(y7));
  par_counter #(.P(3))          u_c3 (.x(x3), .y(y3));
  par_counter #(.P(264))        u_cb (.x(xb), .y(yb));

  function automatic int ones(input logic [263:0] v, input int p);
    int n;
    n = 0;
    for (int i = 0; i < p; i++) if (v[i] == 1'b1) n++;
    return n;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(cnt_bits(7), 3, "cnt_bits(7)");
    check(cnt_bits(15), 4, "cnt_bits(15)");
    check(cnt_bits(16), 5, "cnt_bits(16)");
    check(fb_carries(11), 3, "fb_carries(11)");
    check(fb_carries(5), 2, "fb_carries(5)");
    check(fb_carries(3), 2, "fb_carries(3)");
    check(fb_carries(2), 1, "fb_carries(2)");
    check(fb_carries(256), 8, "fb_carries(256)");
    for (int v = 0; v < 128; v++) begin
      x7 = 7'(v);
      #1;
      check(int'(y7), ones(264'(v), 7), "(7;3)");
    end
    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      check(int'(y3), ones(264'(v), 3), "(3;2)");
    end
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < 264; i++) xb[i] = (k % 4 == 0) ? 1'b1 : 1'($urandom);
      #1;
      check(int'(yb), ones(xb, 264), "(264;9)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
