// fracn_top: digital core of a fractional-N GFSK transmitter whose PLL is
// modulated far beyond its bandwidth by a compensated transmit filter.
//
// Reference clock domain (clk_ref, 20 MHz): the transmit filter turns the
// 2.5 Mb/s data into 10-bit compensated modulation samples; the serial
// register holds the 16-bit carrier word and the 5-bit charge-pump gain; the
// pipelined digital path adds modulation and carrier and runs the
// second-order MASH sigma-delta modulator, producing a 6-bit divide control
// per reference cycle.
// VCO clock domain (clk_vco): the 64-modulus divider divides the VCO by
// 64 + div_ctl and gives one pulse per period to the phase detector.
// The phase detector, charge pump, loop filter and VCO are analog and sit
// outside: div_pulse goes to the phase detector, cp_gain to the charge-pump
// current D/A, and the VCO output comes back as clk_vco.
// The partitioning follows the prototype, except that the transmit filter,
// computed off-chip there, is included. The divide control crosses from the
// reference domain to the VCO domain without synchronisers: it is sampled at
// div_pulse, which in lock falls near the middle of the reference period
// (50% nominal phase detector duty cycle), far from its change just after a
// reference edge. That timing argument is this design's choice.
//
// Timing: a data bit taken at bit_req affects div_ctl after the filter's
// register and the digital path latency (1 + 12 reference cycles); div_ctl
// is used by the divider at its next div_pulse.
module fracn_top (
  input  logic                          clk_ref,
  input  logic                          clk_vco,
  input  logic                          rst_n,
  // data
  input  logic                          data_in,
  output logic                          bit_req,
  // serial control
  input  logic                          ser_data,
  input  logic                          ser_shift,
  input  logic                          ser_load,
  // to the analog part
  output logic [fracn_pkg::GAIN_W-1:0]  cp_gain,
  output logic                          div_pulse,
  // observation
  output logic signed [fracn_pkg::MOD_W-1:0] mod,
  output logic [fracn_pkg::IN_W-1:0]    carrier,
  output logic [fracn_pkg::OUT_W-1:0]   div_ctl
);
  import fracn_pkg::*;

  tx_filter_rom u_txf (
    .clk(clk_ref), .rst_n, .data_in, .bit_req, .mod);

  serial_register u_ser (
    .clk(clk_ref), .rst_n, .sdata(ser_data), .shift(ser_shift), .load(ser_load),
    .carrier, .gain(cp_gain));

  digital_path u_dp (
    .clk(clk_ref), .rst_n, .mod, .carrier, .div_ctl);

  divider_64 u_div (
    .clk(clk_vco), .rst_n, .dctl(div_ctl), .div_pulse);
endmodule
