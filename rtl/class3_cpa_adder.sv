// class3_cpa_adder -- class 3 serial adder, carries summed in a parallel adder.
//
// A (M;Q) counter counts the ones of the current column.  A Q-bit register R
// holds what the earlier columns still contribute, already shifted to the
// weight of the current column.  An ordinary Q-bit parallel adder with carry
// input 0 forms y + R; its bit 0 is the sum bit of this column, and its
// remaining Q bits together with its carry output become R for the next
// column.  Since y <= M < 2^Q and R <= M, R always fits in Q bits.  The
// memory is Q cells: 4 for the default M = 15 ((15;4) counter), 9 for
// M = 256.
//
// The datapath follows the document's class 3 scheme with a parallel adder.
// The adder is written as "+" and left to synthesis, which may build it as a
// ripple or a carry-look-ahead adder; the clear and reset are this design's
// choices.
//
// Timing: the sum bit is combinational (delta = 0).  Raise clear in the
// clock before the LSB column.
module class3_cpa_adder
  import msa_pkg::*;
#(
  parameter int M = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [M-1:0] x,
  output logic         sum
);

  localparam int Q = cnt_bits(M);

  logic [Q-1:0] y;
  logic [Q-1:0] r_q;  // carries from the preceding columns
  logic [Q:0]   t;    // adder result, carry output on top

  par_counter #(.P(M), .Q(Q)) u_cnt (.x(x), .y(y));

  assign t = {1'b0, y} + {1'b0, r_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r_q <= '0;
    else if (clear) r_q <= '0;
    else            r_q <= t[Q:1];
  end

  assign sum = t[0];

endmodule
