// align_shift: brings a word back from the pipe-shifted time domain.
//
// Group g of G bits arrives g cycles after group 0; this block delays group g
// by (NG-1-g) cycles so that all groups of one word leave together, in the
// cycle the top group arrives. The top group passes straight through. The
// structure is the one of the pipelined adder figure; the synchronous
// active-low reset is this design's choice.
//
// Interface: d is the skewed word, q the aligned word.
// Timing: a word whose group 0 arrives in cycle k leaves complete in cycle
// k+NG-1.
module align_shift #(
  parameter int unsigned W = 6,
  parameter int unsigned G = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  localparam int unsigned NG = W / G;

  initial assert (W % G == 0) else $fatal(1, "align_shift: W must be a multiple of G");

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned DLY = NG - 1 - g;
    if (DLY == 0) begin : g_pass
      assign q[g*G +: G] = d[g*G +: G];
    end else begin : g_dly
      logic [G-1:0] sr [DLY];
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int i = 0; i < DLY; i++) sr[i] <= '0;
        end else begin
          sr[0] <= d[g*G +: G];
          for (int i = 1; i < DLY; i++) sr[i] <= sr[i-1];
        end
      end
      assign q[g*G +: G] = sr[DLY-1];
    end
  end
endmodule
