// mash2_pipelined: second-order MASH (1-1) sigma-delta modulator working
// entirely in the pipe-shifted time domain.
//
// Stage 1 accumulates the W-bit input word; its FB_W low bits e1[k] are the
// state and its top OUT_W bits are out1[k]. Stage 2 accumulates e1[k] and its
// carry is out2[k]. The output is
//     OUT[k] = out1[k] + out2[k] - out2[k-1]   (modulo 2^OUT_W)
// i.e. out2 passes through the filter 1-D. The register names follow the
// prototype's pipelined MASH figure: D delays out1 by the one cycle stage 2
// adds, B pipelines the sum between the two output adders, C matches B on
// the out2 path and A is the delay of the 1-D filter. The output adders are
// carry-pipelined adders; their OUT_W bits sit at word bit positions FB_W and
// up, so they keep the skew of those groups.
//
// Interface: d is the skewed input word (group g of word k in cycle k+g),
// y the skewed OUT word (its group j, word bit position FB_W+j*G, in cycle
// k + FB_W/G + j + 3). Feed d from pipe_shift and y into align_shift.
// Synchronous active-low reset clears every register (this design's choice).
module mash2_pipelined #(
  parameter int unsigned W     = fracn_pkg::IN_W,
  parameter int unsigned FB_W  = fracn_pkg::FRAC_W,
  parameter int unsigned G     = fracn_pkg::GRP,
  localparam int unsigned OUT_W = W - FB_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     d,
  output logic [OUT_W-1:0] y
);
  // stage-2 word: e1 padded with one zero group so that its carry lands in a register bit
  localparam int unsigned W2 = FB_W + G;

  logic [W-1:0]     q1;
  logic [W2-1:0]    q2;
  logic [OUT_W-1:0] out1, out1_d;   // out1 and register D
  logic             out2, out2_c, out2_a; // out2, register C, register A
  logic [OUT_W-1:0] sum1, sum1_b;   // first output adder and register B
  logic             unused_cout1, unused_cout2;

  // first-order stage 1: feedback on the FB_W LSBs, out1 = top OUT_W bits
  pipelined_accumulator #(.W(W), .FB_W(FB_W), .G(G)) u_stage1 (
    .clk, .rst_n, .d(d), .q(q1));

  // first-order stage 2: input e1, 1-bit output = carry
  pipelined_accumulator #(.W(W2), .FB_W(FB_W), .G(G)) u_stage2 (
    .clk, .rst_n, .d({{G{1'b0}}, q1[FB_W-1:0]}), .q(q2));

  assign out1 = q1[W-1:FB_W];
  assign out2 = q2[FB_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out1_d <= '0;
      out2_c <= 1'b0;
      out2_a <= 1'b0;
      sum1_b <= '0;
    end else begin
      out1_d <= out1;     // D
      out2_c <= out2;     // C
      out2_a <= out2_c;   // A: out2 of the previous word
      sum1_b <= sum1;     // B
    end
  end

  // out1[k] + out2[k]
  pipelined_adder #(.W(OUT_W), .G(G)) u_add1 (
    .clk, .rst_n, .a(out1_d), .b({{(OUT_W-1){1'b0}}, out2}), .cin(1'b0),
    .s(sum1), .cout(unused_cout1));

  // ... - out2[k-1], as sum1 + ~out2[k-1] + 1
  pipelined_adder #(.W(OUT_W), .G(G)) u_add2 (
    .clk, .rst_n, .a(sum1_b), .b(~{{(OUT_W-1){1'b0}}, out2_a}), .cin(1'b1),
    .s(y), .cout(unused_cout2));
endmodule
