// addend_shifter -- the m input shift registers of a serial multiple adder.
//
// Holds M two's-complement addends of N bits and presents them bit serially,
// one column per clock, least significant bit first: col[i] is the current
// bit of addend i.  Each register shifts right arithmetically, so once an
// addend's N bits have gone by its sign bit keeps repeating.  That is the
// sign prolongation the serial adders need to produce the upper bits of the
// sum, which is longer than the addends.
//
// The document draws these registers feeding the counters and asks for the
// sign bit to be repeated; loading them in parallel is this design's choice.
//
// Timing: on a clock edge with load = 1 the addends are captured; during the
// following clock col shows bit 0 of each addend, then bit 1, and so on.
module addend_shifter #(
  parameter int M = 13,
  parameter int N = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [M-1:0][N-1:0] addends,
  output logic [M-1:0]        col
);

  logic [M-1:0][N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else if (load) sr <= addends;
    else begin
      for (int i = 0; i < M; i++) sr[i] <= {sr[i][N-1], sr[i][N-1:1]};
    end
  end

  always_comb begin
    for (int i = 0; i < M; i++) col[i] = sr[i][0];
  end

endmodule
