// par_counter -- (p;q) parallel counter.
//
// Purely combinational: the q-bit output, read as a binary number, is the
// number of the P inputs that are one.  q is the smallest width with
// P < 2^q, so a counter with P = 2^q - 1 is "saturated" ((3;2), (7;3),
// (15;4), ...).  A (3;2) counter is a full adder: y[0] is its sum and y[1]
// its carry.
//
// The counter's function and notation follow the document; it does not fix
// how the counter is built inside, so this one is written as a plain sum of
// its inputs and left to synthesis (a full-adder network or a ROM would give
// the same outputs).
//
// Interface: x[P-1:0] inputs, all of weight 1; y[Q-1:0] count.  No clock.
module par_counter
  import msa_pkg::*;
#(
  parameter int P = 7,
  parameter int Q = cnt_bits(P)
) (
  input  logic [P-1:0] x,
  output logic [Q-1:0] y
);

  initial assert (P < (1 << Q)) else $error("par_counter: Q=%0d too small for P=%0d", Q, P);

  always_comb begin
    y = '0;
    for (int i = 0; i < P; i++) y = y + Q'(x[i]);
  end

endmodule
