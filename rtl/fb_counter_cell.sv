// fb_counter_cell -- class 1 serial adder with fed-back carries.
//
// Adds N_IN serial numbers with a single parallel counter.  In each clock the
// counter counts the ones of the current column (one bit of every addend)
// together with C carries left over from earlier columns.  Its output bit of
// weight 2^0 is the sum bit of this column; its output bit of weight 2^j
// (j = 1..C) belongs to the column j places further left, so it is fed back
// to the counter's own input through a chain of j memory cells.  C is the
// smallest integer with 2^(C+1) - 1 >= N_IN + C, which makes the counter a
// (N_IN+C ; C+1) counter whose count never overflows.  With the default
// N_IN = 11 this is the (14;4) counter with 1+2+3 = 6 memory cells; with
// N_IN = 2 it is a full adder with one carry memory, and with N_IN = 1 it is
// a wire.
//
// Structure and sizing follow the document's basic class 1 scheme.  The
// synchronous clear and the asynchronous reset of the carry memories are
// this design's own choice.
//
// Timing: sum is combinational from x and the carry memories (delta = 0).
// Present the LSB column in the clock after clear and the sum's LSB appears
// in that same clock; every later clock gives the next column.  To get all
// n + sum_ext(N_IN) sum bits of two's-complement addends, keep feeding each
// addend's sign bit after its n bits.
module fb_counter_cell
  import msa_pkg::*;
#(
  parameter int N_IN = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,  // empties the carry memories
  input  logic [N_IN-1:0] x,      // current column of the addends
  output logic            sum     // sum bit of the current column
);

  localparam int C = fb_carries(N_IN);
  localparam int P = N_IN + C;
  localparam int Q = C + 1;

  logic [Q-1:0] y;

  if (C == 0) begin : g_nocarry
    par_counter #(.P(P), .Q(Q)) u_cnt (.x(x), .y(y));
  end else begin : g_carry
    logic [C:1] fb;  // fb[j]: carry of weight 2^j produced j columns ago

    par_counter #(.P(P), .Q(Q)) u_cnt (.x({fb, x}), .y(y));

    for (genvar j = 1; j <= C; j++) begin : g_mem
      delay_line #(.D(j)) u_mem (
        .clk(clk), .rst_n(rst_n), .clear(clear), .d(y[j]), .q(fb[j])
      );
    end
  end

  assign sum = y[0];

endmodule
