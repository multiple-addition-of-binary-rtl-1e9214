// class1_fa_tree -- class 1 serial adder made of full adders only.
//
// Each full adder is a (3;2) counter taking two serial numbers and its own
// carry of the previous column, kept in one memory cell; its sum output is
// one serial number.  A stage of floor(n/2) full adders therefore halves a
// set of n numbers (an odd one out passes along), and ceil(log2 M) stages
// reduce the M addends to the sum.  For M = 256 that is 255 full adders, 255
// carry memories and 8 stages.
//
// With PIPE_EVERY = 1 (default) every full adder also has a memory cell on
// its sum output, and an odd number passed along gets one as well, so every
// clock spans one full adder and one memory cell.  The sum then appears
// DELTA = STAGES clocks after the column it belongs to.  PIPE_EVERY = k > 1
// puts these memories only after every k-th stage (counting from the
// inputs), so a clock spans k full adders and DELTA = floor(STAGES / k).
// PIPE_EVERY = 0 leaves them out: the tree is combinational between carry
// memories and DELTA = 0.
//
// The tree, the carry and sum memories and the stage count follow the
// document's full-adder scheme.  Which addends are paired, registering the
// odd number passed along, where the memories go for PIPE_EVERY > 1, and
// the clear/reset are this design's choices.
//
// Timing: raise clear in the clock before the LSB column (it empties the
// carry and sum memories); sum bit k appears DELTA clocks after column k.
module class1_fa_tree
  import msa_pkg::*;
#(
  parameter int M    = 256,
  parameter int PIPE_EVERY = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [M-1:0] x,
  output logic         sum
);

  function automatic int nums_at(input int s);
    int n;
    n = M;
    for (int k = 0; k < s; k++) n = (n + 1) / 2;
    return n;
  endfunction

  function automatic int num_stages();
    int n, s;
    n = M;
    s = 0;
    while (n > 1) begin
      n = (n + 1) / 2;
      s++;
    end
    return s;
  endfunction

  localparam int STAGES = num_stages();

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int NIN = nums_at(s);
    localparam int NFA = NIN / 2;
    localparam int NOUT = nums_at(s + 1);
    logic [NIN-1:0]  xin;  // current bits of the numbers entering the stage
    logic [NOUT-1:0] red;  // full-adder sums (and the odd number)
    logic [NOUT-1:0] xout; // numbers handed to the next stage

    if (s == 0) begin : g_first
      assign xin = x;
    end else begin : g_next
      assign xin = g_stage[s-1].xout;
    end
    logic [NFA-1:0]  cy_q;  // carry memories

    for (genvar f = 0; f < NFA; f++) begin : g_fa
      logic [1:0] y;
      par_counter #(.P(3), .Q(2)) u_fa (
        .x({cy_q[f], xin[2*f+1], xin[2*f]}), .y(y)
      );
      assign red[f] = y[0];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     cy_q[f] <= 1'b0;
        else if (clear) cy_q[f] <= 1'b0;
        else            cy_q[f] <= y[1];
      end
    end

    if (NIN % 2 == 1) begin : g_odd
      assign red[NOUT-1] = xin[NIN-1];
    end

    if (PIPE_EVERY > 0 && (s + 1) % PIPE_EVERY == 0) begin : g_pipe
      logic [NOUT-1:0] held;  // sum memories
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     held <= '0;
        else if (clear) held <= '0;
        else            held <= red;
      end
      assign xout = held;
    end else begin : g_nopipe
      assign xout = red;
    end
  end

  if (STAGES == 0) begin : g_single
    assign sum = x[0];
  end else begin : g_sum
    assign sum = g_stage[STAGES-1].xout[0];
  end

endmodule
