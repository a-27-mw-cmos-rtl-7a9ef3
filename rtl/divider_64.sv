// divider_64: 64-modulus divider of the synthesizer feedback path.
//
// A divide-by-4/5/6/7 prescaler (controlled by D1 D0) is followed by four
// divide-by-2/3 cells (controlled by D2..D5). The end-of-period signal runs
// back from the last cell through the cells to the prescaler control, so
// every stage swallows its binary-weighted number of input cycles once per
// output period:   division = 64 + D,  D = {D5..D0} = 0..63.
// Counted in VCO cycles this is 64..127 (the prototype's 32..63.5 of the
// on-chip input, which runs at half the VCO rate). The structure follows
// the document; the whole divider is written in the input clock domain
// with pulse enables instead of an asynchronous ripple chain.
//
// Interface: clk is the VCO, dctl the divide control, div_pulse one clk cycle
// per output period (the edge the phase detector compares with the reference).
// Timing: dctl is used in the cycle of div_pulse; the period that starts
// there lasts 64 + dctl cycles. dctl must be stable around each div_pulse.
module divider_64 #(
  parameter int unsigned N_CELLS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_CELLS+1:0] dctl,
  output logic               div_pulse
);
  logic [N_CELLS:0] pulse;    // pulse[0]: prescaler output, pulse[i+1]: cell i output
  logic [N_CELLS-1:0] modsig; // modsig[i]: mod input of stage i (0: prescaler, i>0: cell i-1)

  prescaler_4567 u_pre (
    .clk, .rst_n, .d(dctl[1:0]), .mod_in(modsig[0]),
    .out_pulse(pulse[0]), .phase(), .mux_out());

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    logic mod_in_i;
    if (i == N_CELLS - 1) begin : g_last
      assign mod_in_i = 1'b1;
    end else begin : g_mid
      assign mod_in_i = modsig[i+1];
    end
    div23_cell u_cell (
      .clk, .rst_n, .in_pulse(pulse[i]), .p(dctl[i+2]), .mod_in(mod_in_i),
      .out_pulse(pulse[i+1]), .mod_out(modsig[i]));
  end

  assign div_pulse  = pulse[N_CELLS];
endmodule
