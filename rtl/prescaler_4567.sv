// prescaler_4567: the high-speed divide-by-4/5/6/7 first stage of the
// 64-modulus divider.
//
// Two divide-by-two stages produce four phases PHI1..PHI4 of a quarter-rate
// square wave, each lagging the previous one by one input cycle. A 4-to-1
// multiplexer selects one phase; each rising edge of the selected phase is
// one prescaler output pulse (period 4). To swallow d input cycles (d =
// 2*D1 + D0) the control moves the multiplexer to the next, later phase once
// per input cycle, d times, starting just after an output edge. Each move
// happens while both the old and the new phase are high, so no edge is
// created and the high time, and thus the period, grows by d cycles. The
// swallow is done once per divider output period, when mod_in (from the
// first divide-by-2/3 cell) is high at an output edge.
// The four-phase structure and the multiplexer follow the document. The
// first divide-by-two (div2_q, which toggles every input cycle) sits off-chip
// in the prototype and is included here. The second divide-by-two is
// written as two flip-flops clocked on alternate input cycles (phi1_q,
// phi2_q), which gives the one-cycle stagger; the one-phase-per-cycle
// control is this design's choice.
//
// Interface: clk is the divider input (the VCO), d the 2-bit swallow count,
// out_pulse one cycle per prescaler period, phase the four phases, mux_out
// the selected phase.
// Timing: the period that starts with an out_pulse where mod_in is high lasts
// 4 + d input cycles; all others last 4.
module prescaler_4567 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] d,
  input  logic       mod_in,
  output logic       out_pulse,
  output logic [3:0] phase,
  output logic       mux_out
);
  logic       div2_q;          // first divide-by-two (off-chip in the prototype)
  logic       phi1_q, phi2_q;  // second divide-by-two, both edges
  logic [1:0] sel;             // multiplexer select: phase sel+1
  logic [1:0] shift_left;      // phase moves still to do
  logic       mux_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div2_q <= 1'b0;
      phi1_q <= 1'b1;
      phi2_q <= 1'b0;
    end else begin
      div2_q <= ~div2_q;
      if (div2_q)  phi1_q <= ~phi1_q;
      if (!div2_q) phi2_q <= ~phi2_q;
    end
  end

  // PHI1 high in cycles 0,1 of the four-cycle pattern, PHI2 in 1,2, PHI3 in 2,3, PHI4 in 3,0
  assign phase   = {~phi2_q, ~phi1_q, phi2_q, phi1_q};
  assign mux_out = phase[sel];

  assign out_pulse = mux_out && !mux_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel        <= 2'd0;
      shift_left <= 2'd0;
      mux_q      <= 1'b0;
    end else begin
      mux_q <= mux_out;
      if (out_pulse && mod_in) begin
        shift_left <= d;
      end else if (shift_left != 2'd0) begin
        sel        <= sel + 2'd1;
        shift_left <= shift_left - 2'd1;
      end
    end
  end

  // a phase move may only happen while the selected phase is high
  assert property (@(posedge clk) disable iff (!rst_n) (shift_left != 2'd0 && !(out_pulse && mod_in)) |-> mux_out);
endmodule
