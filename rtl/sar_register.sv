// sar_register -- WIDTH-bit sequential approximation register (top level).
//
// The register RG holds the present approximation Q. On every rising clock
// edge it loads the value chosen by sar_logic from the iteration number itr
// and the decision d: mid-scale on itr = 0, otherwise Q plus or minus the
// weight 2^(WIDTH-1-itr). An outside controller steps itr through
// 0, 1, ..., WIDTH-1 and sets d from a comparison (for instance d = 1 while
// the target lies above Q); after WIDTH clock edges Q is within one LSB of
// the target. With WIDTH = 8 this is the 8-bit register of the reference
// design; WIDTH may be any value from 2 upwards, multiples of 8 or not.
//
// Interface: clk, asynchronous active-low reset rst_n (clears Q to 0),
// itr and d sampled on the rising edge, q is the register output.
// Timing: one iteration per clock; q shows the result of the iteration
// presented at an edge right after that edge.
//
// Following the reference design: the logic block feeding a register of D
// flip-flops, with itr and d supplied from outside. Own choices: the clock
// edge, the reset and its value, and loading on every edge (no enable).
module sar_register #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned ITR_W = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ITR_W-1:0] itr,
  input  logic             d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] q_next;

  sar_logic #(
    .WIDTH (WIDTH),
    .ITR_W (ITR_W)
  ) u_logic (
    .itr    (itr),
    .d      (d),
    .q      (q),
    .q_next (q_next)
  );

  // Register RG.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

endmodule
