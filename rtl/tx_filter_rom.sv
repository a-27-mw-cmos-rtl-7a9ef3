// tx_filter_rom: compensated Gaussian (GFSK) digital transmit filter.
//
// The binary data stream is filtered by a Gaussian filter (BT = 0.5) cascaded
// with a compensation filter C(f) = 1/G(f), the inverse of the PLL's
// closed-loop response, so that the modulation reaches the VCO with a flat
// overall response although the data rate is far above the PLL bandwidth.
// As suggested for a ROM-based filter, the output is a table lookup whose
// address is the last SPAN data bits and a sample counter. Each table entry
// is the sum over the SPAN bits b_j (newest j = 0) of
//     (2*b_j - 1) * dev * (fz/fcp) * [ g(t_j) + g'(t_j)/(2*pi*fo*Q) + g''(t_j)/(2*pi*fo)^2 ]
// with g the unit frequency pulse (a one-bit rectangle convolved with the
// Gaussian, 1 for a long run of ones), dev = h/(2*Td*fref) the peak
// deviation in divide steps (h = 0.5, Td = 400 ns, fref = 20 MHz),
// fo = 84.3 kHz, Q = 0.75, fz = 11.6 kHz, fcp = 14.2 kHz, and
// t_j = (j - (SPAN-1)/2)*Td + (phase + 0.5)*Td/OSR - Td/2, rounded to units
// of 2^-6 divide steps (a signed 10-bit code, peak about 300). The filter
// form and all constants of the formula come from the document; the table
// size (OSR = 8, SPAN = 4), the rounding and the code weight are this
// design's choices. The table is read from rtl/tx_filter_rom.hex.
//
// Interface: data_in is sampled when bit_req is high; mod is the signed
// modulation sample, one per clock (20 MHz), for digital_path.
// Timing: a new bit is taken every OSR clocks (2.5 Mb/s at 20 MHz); mod is
// registered and changes one clock after the address.
module tx_filter_rom #(
  parameter int unsigned OSR      = fracn_pkg::OSR,
  parameter int unsigned SPAN     = fracn_pkg::SPAN,
  parameter int unsigned MOD_W    = fracn_pkg::MOD_W,
  parameter string       ROM_FILE = "rtl/tx_filter_rom.hex"
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    data_in,
  output logic                    bit_req,
  output logic signed [MOD_W-1:0] mod
);
  localparam int unsigned PH_W  = $clog2(OSR);
  localparam int unsigned DEPTH = (2 ** SPAN) * OSR;

  logic [MOD_W-1:0] rom [DEPTH];
  logic [SPAN-1:0]  hist;    // hist[0] is the newest bit
  logic [PH_W-1:0]  phase;

  initial $readmemh(ROM_FILE, rom);

  assign bit_req = (phase == PH_W'(OSR - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      hist  <= '0;
      mod   <= '0;
    end else begin
      phase <= bit_req ? '0 : phase + 1'b1;
      if (bit_req) hist <= {hist[SPAN-2:0], data_in};
      mod <= $signed(rom[{hist, phase}]);
    end
  end
endmodule
