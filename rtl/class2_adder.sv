// class2_adder -- class 2 serial adder with feed-forward carries.
//
// The carries of a counter are not returned to its own inputs.  Instead the
// q outputs of a counter fed with n serial numbers are themselves read as q
// serial numbers: output bit j, of weight 2^j, is delayed by j memory cells
// so that it lines up with the column it belongs to.  The q numbers have the
// same sum as the n numbers, so the next stage counts them with a (q; q')
// counter, and so on until two numbers are left.  A last stage adds those
// two with a full adder whose carry is fed back through one memory cell; it
// is the only feedback in the circuit.
//
// For the default M = 13 the chain is (13;4) -> (4;3) -> (3;2) -> (3;2)
// with feedback, using 6 + 3 + 1 + 1 = 11 memory cells.
//
// The stage chain and its delays follow the document's class 2 scheme; the
// clear/reset of the memories is this design's choice.
//
// Timing: bit 0 of every counter is not delayed, so the sum bit of a column
// appears in the same clock as the column (delta = 0).  Raise clear in the
// clock before the LSB column.
module class2_adder
  import msa_pkg::*;
#(
  parameter int M = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [M-1:0] x,
  output logic         sum
);

  // Number of serial numbers entering reduction stage s.
  function automatic int nums_at(input int s);
    int n;
    n = M;
    for (int k = 0; k < s; k++) n = cnt_bits(n);
    return n;
  endfunction

  // Number of feed-forward stages: reduce while more than two numbers remain.
  function automatic int num_stages();
    int n, s;
    n = M;
    s = 0;
    while (n > 2) begin
      n = cnt_bits(n);
      s++;
    end
    return s;
  endfunction

  localparam int STAGES = num_stages();
  localparam int NLAST  = nums_at(STAGES);  // 2, or 1 when M = 1

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int NIN = nums_at(s);
    localparam int Q   = cnt_bits(NIN);
    logic [NIN-1:0] xin;      // current bits of the numbers entering the stage
    logic [Q-1:0]   y;
    logic [Q-1:0]   aligned;  // counter outputs lined up by weight

    if (s == 0) begin : g_first
      assign xin = x;
    end else begin : g_next
      assign xin = g_stage[s-1].aligned;
    end

    par_counter #(.P(NIN), .Q(Q)) u_cnt (.x(xin), .y(y));

    assign aligned[0] = y[0];
    for (genvar j = 1; j < Q; j++) begin : g_dly
      delay_line #(.D(j)) u_mem (
        .clk(clk), .rst_n(rst_n), .clear(clear), .d(y[j]), .q(aligned[j])
      );
    end

  end

  // Final serial adder: the only stage with a fed-back carry.
  logic [NLAST-1:0] last_in;
  if (STAGES == 0) begin : g_direct
    assign last_in = x;
  end else begin : g_reduced
    assign last_in = g_stage[STAGES-1].aligned;
  end

  fb_counter_cell #(.N_IN(NLAST)) u_last (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .x(last_in), .sum(sum)
  );

endmodule
