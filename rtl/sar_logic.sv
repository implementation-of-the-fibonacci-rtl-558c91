// sar_logic -- next-value logic of a sequential approximation register.
//
// A sequential approximation register (SAR) walks its output towards a target
// by halving steps: the first iteration loads mid-scale, 2^(WIDTH-1), and every
// later iteration i either adds or subtracts the weight 2^(WIDTH-1-i) to or
// from the present value, as the decision input d asks. For WIDTH = 8 the
// sequence of weights is 128, then +/-64, +/-32, ..., +/-1. The weights are the
// powers of two, which are also the leading terms of the tetranacci sequence
// (0, 1, 1, 2, 4, 8, 16, 30, ...); this is what links the method to the
// Fibonacci family of sequences.
//
// Interface: itr is the iteration number, d selects add (1) or subtract (0),
// q is the present register output and q_next the value to load into it.
// The block is purely combinational; the register lives in sar_register.
//
// Following the reference design: the mid-scale load on iteration 0 whatever
// d is, and the add/subtract of a halving weight on iterations 1..WIDTH-1.
// Own choices: results wrap modulo 2^WIDTH like any WIDTH-bit register; the
// weights generalise to any WIDTH; an itr of WIDTH or more (possible only when
// WIDTH is not a power of two) holds the present value.
module sar_logic #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned ITR_W = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic [ITR_W-1:0] itr,
  input  logic             d,
  input  logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] q_next
);

  logic [WIDTH-1:0] step;

  // Weight of the present iteration: 2^(WIDTH-1-itr).
  always_comb begin
    step = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (32'(itr) == i) step[WIDTH-1-i] = 1'b1;
    end
  end

  always_comb begin
    if (32'(itr) >= WIDTH) begin
      q_next = q;                 // unused iteration code: hold
    end else if (itr == '0) begin
      q_next = step;              // first iteration: mid-scale
    end else if (d) begin
      q_next = q + step;          // increase the output
    end else begin
      q_next = q - step;          // decrease the output
    end
  end

endmodule
