// pipe_shift: moves a word into the "pipe-shifted" time domain used by the
// carry-pipelined arithmetic of the sigma-delta path.
//
// The word is cut into groups of G bits. Group g (bits g*G .. g*G+G-1) is
// delayed by g clock cycles, so that it reaches a pipelined adder at the same
// cycle as the carry coming out of group g-1. Group 0 passes straight through.
// Grouping by two bits follows the prototype; a synchronous active-low reset
// clears the delay registers, which is this design's choice.
//
// Interface: d is the aligned input word, q the skewed output word.
// Timing: group g of the word presented in cycle k appears on q in cycle k+g.
module pipe_shift #(
  parameter int unsigned W = 16,
  parameter int unsigned G = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  localparam int unsigned NG = W / G;

  initial assert (W % G == 0) else $fatal(1, "pipe_shift: W must be a multiple of G");

  for (genvar g = 0; g < NG; g++) begin : g_grp
    if (g == 0) begin : g_pass
      assign q[G-1:0] = d[G-1:0];
    end else begin : g_dly
      logic [G-1:0] sr [g];
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int i = 0; i < g; i++) sr[i] <= '0;
        end else begin
          sr[0] <= d[g*G +: G];
          for (int i = 1; i < g; i++) sr[i] <= sr[i-1];
        end
      end
      assign q[g*G +: G] = sr[g-1];
    end
  end
endmodule
