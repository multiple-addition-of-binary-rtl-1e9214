// class1_multistage -- class 1 serial adder built from counters of limited size.
//
// When one counter with M + c inputs is too large, the M addends are split
// into groups of at most GROUP addends.  Each group is added by its own
// feed-back-carry counter cell (fb_counter_cell), which turns the group into
// a single serial number.  The numbers so obtained form a smaller set that is
// split and reduced again in the same way, stage after stage, until one
// number - the sum - is left.  A group of one addend needs no counter and
// passes straight on.
//
// With the defaults (M = 13, GROUP = 5) the first stage has two (7;3) cells
// for five addends each and one (5;3) cell for the remaining three, and a
// second-stage (5;3) cell adds their three outputs: nine counter inputs of
// weight 2^1 or 2^2 are carries, held in 12 memory cells.  GROUP = 5 is what
// a (7;3) counter can take besides its own two carries.  Grouping the
// addends in index order is this design's choice; any partition gives the
// same sum.
//
// PIPE = 1 puts one memory cell on every number passed from one stage to
// the next, so that each clock covers one stage only; the sum then comes
// STAGES - 1 clocks late.  PIPE = 0 (the default) has no such cells and
// delta = 0.
//
// Timing: as fb_counter_cell.  Raise clear in the clock before the LSB
// column; sum bit k of the addition appears DELTA clocks after column k is
// presented.  clear also empties the inter-stage cells, so a stage sees zero
// columns, which make no carries, until the LSB column reaches it.
module class1_multistage
  import msa_pkg::*;
#(
  parameter int M     = 13,
  parameter int GROUP = 5,
  parameter bit PIPE  = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [M-1:0] x,
  output logic         sum
);

  // Number of serial numbers entering stage s.
  function automatic int nums_at(input int s);
    int n;
    n = M;
    for (int k = 0; k < s; k++) n = (n + GROUP - 1) / GROUP;
    return n;
  endfunction

  function automatic int num_stages();
    int n, s;
    n = M;
    s = 0;
    while (n > 1) begin
      n = (n + GROUP - 1) / GROUP;
      s++;
    end
    return s;
  endfunction

  localparam int STAGES = num_stages();

  initial assert (GROUP >= 2) else $error("class1_multistage: GROUP must be at least 2");

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int NIN  = nums_at(s);
    localparam int NOUT = nums_at(s + 1);
    logic [NIN-1:0]  xin;  // current bits of the numbers entering the stage
    logic [NOUT-1:0] red;  // reduced numbers, before any pipeline cell
    logic [NOUT-1:0] xout; // numbers handed to the next stage

    if (s == 0) begin : g_first
      assign xin = x;
    end else begin : g_next
      assign xin = g_stage[s-1].xout;
    end

    for (genvar g = 0; g < NOUT; g++) begin : g_grp
      localparam int BASE = g * GROUP;
      localparam int SIZE = (NIN - BASE < GROUP) ? NIN - BASE : GROUP;
      if (SIZE == 1) begin : g_pass
        assign red[g] = xin[BASE];
      end else begin : g_cell
        fb_counter_cell #(.N_IN(SIZE)) u_cell (
          .clk(clk), .rst_n(rst_n), .clear(clear),
          .x(xin[BASE +: SIZE]), .sum(red[g])
        );
      end
    end

    if (PIPE && s < STAGES - 1) begin : g_pipe
      logic [NOUT-1:0] held;
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
