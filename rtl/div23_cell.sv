// div23_cell: one divide-by-2/3 section of the multimodulus divider.
//
// The cell normally passes on one output pulse for every two input pulses.
// When its control bit p is one it swallows one extra input pulse, once per
// period of the whole divider's output. The "once per period" timing comes
// from mod_in, which the next cell (closer to the divider output) raises only
// in the input cycle where that cell emits its own output pulse while its own
// mod_in is high; the last cell's mod_in is tied high. With n cells the
// divider then divides by 2^n + sum(p_i * 2^i). This cascaded-2/3 principle
// and the per-period swallowing follow the document; the cell is written as
// a synchronous state machine with pulse enables in the divider's input
// clock domain, instead of the asynchronous ripple chain of the silicon, so
// that the RTL has one clock. The mod_in/mod_out handshake is this design's
// choice.
//
// Interface: in_pulse marks one input edge (one cycle of clk), out_pulse the
// output edge (asserted in the same cycle as the in_pulse that causes it),
// p the swallow control, mod_in/mod_out the end-of-period signal.
// Timing: out_pulse and mod_out are combinational from in_pulse and the
// state; the swallow decided in a cycle with out_pulse & mod_in & p lengthens
// the following output period from 2 to 3 input pulses.
module div23_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic in_pulse,
  input  logic p,
  input  logic mod_in,
  output logic out_pulse,
  output logic mod_out
);
  // number of further input pulses before the next output pulse
  logic [1:0] cnt;

  assign out_pulse = in_pulse && (cnt == 2'd0);
  assign mod_out   = mod_in && out_pulse;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= 2'd0;
    end else if (in_pulse) begin
      if (cnt == 2'd0) cnt <= (p && mod_in) ? 2'd2 : 2'd1;
      else             cnt <= cnt - 2'd1;
    end
  end
endmodule
