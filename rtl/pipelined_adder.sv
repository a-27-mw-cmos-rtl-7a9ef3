// pipelined_adder: adder for operands in the pipe-shifted time domain.
//
// The operands are cut into groups of G bits; group g of a word arrives one
// cycle after group g-1. Each group has its own small adder. The carry out of
// group g is registered and used by group g+1 in the next cycle, which is the
// cycle its own bits of the same word arrive. The carry chain, the critical
// path of a plain adder, is thus broken into G-bit pieces, as in the
// prototype's pipelined adder.
//
// Interface: a, b are skewed operands, cin enters group 0 (set it and invert b
// to subtract), s is the skewed sum (combinational from the inputs and the
// carry registers), cout is the carry out of the top group, valid in the
// cycle the top group of the word is present.
// Timing: group g of s belongs to the word whose group g is on a and b now.
module pipelined_adder #(
  parameter int unsigned W = 16,
  parameter int unsigned G = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NG = W / G;

  initial assert (W % G == 0) else $fatal(1, "pipelined_adder: W must be a multiple of G");

  logic [NG-1:0] c_in;   // carry into each group
  logic [NG-1:0] c_out;  // carry out of each group

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic [G:0] sum;
    if (g == 0) begin : g_cin
      assign c_in[0] = cin;
    end else begin : g_creg
      // carry register between group g-1 and group g
      always_ff @(posedge clk) begin
        if (!rst_n) c_in[g] <= 1'b0;
        else        c_in[g] <= c_out[g-1];
      end
    end
    assign sum         = {1'b0, a[g*G +: G]} + {1'b0, b[g*G +: G]} + (G+1)'(c_in[g]);
    assign s[g*G +: G] = sum[G-1:0];
    assign c_out[g]    = sum[G];
  end

  assign cout = c_out[NG-1];
endmodule
