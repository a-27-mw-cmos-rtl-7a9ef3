// pipelined_accumulator: first-order digital sigma-delta stage built as a
// carry-pipelined accumulator in the pipe-shifted time domain.
//
// Each clock the W-bit input word is added to the register. Only the FB_W
// least significant bits of the register are fed back (the accumulator
// state, e[k] of the first-order stage); the bits above them are the stage
// output: the input's upper bits plus the carry out of the fed-back part,
// with no feedback, as the prototype removes the feedback from the most
// significant bits. Carries between G-bit groups are registered, so group g
// of a word is processed one cycle after group g-1. Because no information
// flows from higher to lower bits, the pipelining does not change the result.
// To obtain a 1-bit carry output, pad the input with zero groups above FB_W:
// bit FB_W of q is then the carry out of the fed-back part.
//
// Interface: d is the skewed input word, q the skewed register (q[FB_W-1:0] is
// e[k], q[W-1:FB_W] is out[k]).
// Timing: group g of the word whose group g is on d in cycle t is on q in
// cycle t+1. Synchronous active-low reset clears the register (this design's
// choice).
module pipelined_accumulator #(
  parameter int unsigned W    = 16,
  parameter int unsigned FB_W = 10,
  parameter int unsigned G    = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  localparam int unsigned NG  = W / G;
  localparam int unsigned NFB = FB_W / G;

  initial assert (W % G == 0 && FB_W % G == 0 && FB_W < W)
    else $fatal(1, "pipelined_accumulator: widths must be multiples of G and FB_W < W");

  logic [NG-1:0] c_in;
  logic [NG-1:0] c_out;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic [G:0]   sum;
    logic [G-1:0] fb;
    if (g < NFB) begin : g_fb
      assign fb = q[g*G +: G];      // accumulator state is fed back
    end else begin : g_nofb
      assign fb = '0;               // output bits: no feedback
    end
    if (g == 0) begin : g_c0
      assign c_in[0] = 1'b0;
    end else begin : g_creg
      always_ff @(posedge clk) begin
        if (!rst_n) c_in[g] <= 1'b0;
        else        c_in[g] <= c_out[g-1];
      end
    end
    assign sum      = {1'b0, d[g*G +: G]} + {1'b0, fb} + (G+1)'(c_in[g]);
    assign c_out[g] = sum[G];
    always_ff @(posedge clk) begin
      if (!rst_n) q[g*G +: G] <= '0;
      else        q[g*G +: G] <= sum[G-1:0];
    end
  end
endmodule
