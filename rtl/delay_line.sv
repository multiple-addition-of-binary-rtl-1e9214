// delay_line -- D memory cells in a chain.
//
// Delays a single bit by D clocks: q is d as it was D rising edges ago.
// D must be at least 1.  The serial adders use it for their carry memories:
// a carry of weight 2^j leaves a counter j columns ahead of the column it
// belongs to, so it waits j clocks.
//
// clear (synchronous) empties the chain; it is raised together with the
// loading of a new set of addends so that no carry of the previous addition
// leaks into the next one.  rst_n is an asynchronous active-low reset.
// Both are choices of this design; the document does not say how the memory
// cells are initialised.
module delay_line #(
  parameter int D = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic d,
  output logic q
);

  initial assert (D >= 1) else $error("delay_line: D must be at least 1");

  // cells[k] holds the bit of k+1 clocks ago.
  logic [D-1:0] cells;
  if (D == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     cells <= '0;
      else if (clear) cells <= '0;
      else            cells <= d;
    end
  end else begin : g_many
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     cells <= '0;
      else if (clear) cells <= '0;
      else            cells <= {cells[D-2:0], d};
    end
  end
  assign q = cells[D-1];

endmodule
