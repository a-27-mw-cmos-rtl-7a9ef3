// serial_register: serial control register that sets the carrier frequency
// word and the charge-pump gain.
//
// Control bits are shifted in MSB first, one per clock with shift high, into
// a CAR_W+GAIN_W bit shift register. A load pulse copies the shift register
// into the output registers: the upper CAR_W bits become the carrier
// frequency word, the lower GAIN_W bits the gain word of the charge-pump
// current D/A. Shifting does not disturb the outputs, so the carrier word
// stays constant during modulation. Only the register's name and the two
// word widths come from the document; the shift/load protocol, the bit
// order and the reset values are this design's choices.
//
// Interface: sdata/shift/load in the reference clock domain; carrier, gain
// registered outputs.
// Timing: a load in cycle t updates carrier and gain from cycle t+1; a shift
// in the same cycle as load is captured after the copy.
module serial_register #(
  parameter int unsigned CAR_W  = fracn_pkg::IN_W,
  parameter int unsigned GAIN_W = fracn_pkg::GAIN_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sdata,
  input  logic              shift,
  input  logic              load,
  output logic [CAR_W-1:0]  carrier,
  output logic [GAIN_W-1:0] gain
);
  logic [CAR_W+GAIN_W-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr      <= '0;
      carrier <= '0;
      gain    <= '0;
    end else begin
      if (shift) sr <= {sr[CAR_W+GAIN_W-2:0], sdata};
      if (load) begin
        carrier <= sr[CAR_W+GAIN_W-1:GAIN_W];
        gain    <= sr[GAIN_W-1:0];
      end
    end
  end
endmodule
