// digital_path: the synthesizer's digital modulation path, from the 10-bit
// modulation samples and the 16-bit carrier word to the 6-bit divide control.
//
// The modulation sample is sign-extended, weighted by 2^MOD_SHIFT within the
// 16-bit word, and pipe-shifted. It is then added to the carrier word in a
// carry-pipelined adder; the carrier is not pipe-shifted because it is held
// constant while modulating, as in the prototype. The sum is registered
// (the delay element after the adder in the datapath figure) and drives the
// pipelined second-order MASH modulator, whose 6-bit output is aligned
// again. The 16-bit word is read as 6 integer bits and 10 fractional bits
// of the divide value above 64: a carrier word C selects an average
// division of 64 + C/1024.
// The modulation weight MOD_SHIFT and the signed modulation format are this
// design's choices, as is the output register that gives the divider a
// glitch-free control word.
//
// Interface: mod is a signed sample per clock, carrier the frequency word,
// div_ctl the divide control (division = 64 + div_ctl).
// Timing: one sample per clock (20 MHz in the prototype). The sample entered
// in cycle k determines div_ctl from cycle k+LATENCY on, LATENCY = IN_W/GRP+4
// (12 at the defaults). Changing carrier while running makes the words in
// flight take the new carrier group by group.
module digital_path #(
  parameter int unsigned IN_W      = fracn_pkg::IN_W,
  parameter int unsigned FRAC_W    = fracn_pkg::FRAC_W,
  parameter int unsigned MOD_W     = fracn_pkg::MOD_W,
  parameter int unsigned MOD_SHIFT = fracn_pkg::MOD_SHIFT,
  parameter int unsigned G         = fracn_pkg::GRP,
  localparam int unsigned OUT_W    = IN_W - FRAC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [MOD_W-1:0] mod,
  input  logic [IN_W-1:0]         carrier,
  output logic [OUT_W-1:0]        div_ctl
);
  logic [IN_W-1:0]  mod_word, mod_sk, sum_sk, x_sk;
  logic [OUT_W-1:0] y_sk, y;
  logic             unused_cout;

  assign mod_word = IN_W'($signed(mod)) << MOD_SHIFT;

  pipe_shift #(.W(IN_W), .G(G)) u_pipe (.clk, .rst_n, .d(mod_word), .q(mod_sk));

  pipelined_adder #(.W(IN_W), .G(G)) u_add (
    .clk, .rst_n, .a(mod_sk), .b(carrier), .cin(1'b0), .s(sum_sk), .cout(unused_cout));

  always_ff @(posedge clk) begin
    if (!rst_n) x_sk <= '0;
    else        x_sk <= sum_sk;    // delay after the carrier adder
  end

  mash2_pipelined #(.W(IN_W), .FB_W(FRAC_W), .G(G)) u_mash (.clk, .rst_n, .d(x_sk), .y(y_sk));

  align_shift #(.W(OUT_W), .G(G)) u_align (.clk, .rst_n, .d(y_sk), .q(y));

  always_ff @(posedge clk) begin
    if (!rst_n) div_ctl <= '0;
    else        div_ctl <= y;
  end
endmodule
