// class3_csa_adder -- class 3 serial adder, carries kept in carry-save form.
//
// A (M;Q) counter counts the ones of the current column.  Whatever of the
// earlier columns has not yet been output is held as two (Q-1)-bit numbers
// A and B.  Q-1 full adders add, bit by bit, the counter output y, A and B:
// full adder j takes y[j], A[j] and B[j].  The sum output of full adder 0 is
// the sum bit of this column.  Everything else moves one place down for the
// next column: A takes the sum outputs of full adders 1..Q-2 and, on top,
// the counter's most significant bit y[Q-1]; B takes the carry outputs of
// all the full adders.  The memory is 2(Q-1) cells: 8 for the default
// (31;5) counter, 16 for 256 addends.
//
// The datapath follows the document's carry-save class 3 scheme.  The
// counter's inner structure, the clear and the reset are this design's
// choices.
//
// Timing: the sum bit is combinational from the current column and the
// registers (delta = 0).  Raise clear in the clock before the LSB column.
module class3_csa_adder
  import msa_pkg::*;
#(
  parameter int M = 31
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [M-1:0] x,
  output logic         sum
);

  localparam int Q = cnt_bits(M);

  initial assert (M >= 2) else $error("class3_csa_adder: needs at least two addends");

  logic [Q-1:0] y;
  logic [Q-2:0] a_q, b_q;  // carries from the preceding columns
  logic [Q-2:0] s, c;      // full-adder sum and carry outputs

  par_counter #(.P(M), .Q(Q)) u_cnt (.x(x), .y(y));

  for (genvar j = 0; j < Q - 1; j++) begin : g_fa
    logic [1:0] fy;
    par_counter #(.P(3), .Q(2)) u_fa (.x({b_q[j], a_q[j], y[j]}), .y(fy));
    assign s[j] = fy[0];
    assign c[j] = fy[1];
  end

  logic [Q-2:0] a_d;
  if (Q > 2) begin : g_shift
    assign a_d = {y[Q-1], s[Q-2:1]};
  end else begin : g_top
    assign a_d = y[Q-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (clear) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      a_q <= a_d;
      b_q <= c;
    end
  end

  assign sum = s[0];

endmodule
