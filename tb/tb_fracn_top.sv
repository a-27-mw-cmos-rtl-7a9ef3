// tb_fracn_top: end-to-end test of the synthesizer's digital core at its
// default parameters.
//
// The analog loop is replaced by an ideal locked PLL: every divider output
// pulse is followed, a few VCO cycles later, by a reference clock edge, so
// the reference and divider frequencies are equal and each reference cycle
// consumes exactly one divide value. The testbench programs the carrier word
// and the charge-pump gain through the serial register, sends random data
// through the transmit filter, reprograms the carrier half-way, and checks:
//  - every divider period equals 64 + the divide control present at its
//    first pulse;
//  - every divide control word equals the word-level MASH model fed with the
//    carrier and modulation samples seen at the digital path's inputs
//    (12 reference cycles of latency);
//  - the transmit filter takes one data bit every 8 reference cycles;
//  - the average division matches 64 + carrier/1024 + modulation/64;
//  - the gain word reaches its output.
// It counts how often each mechanism happened (prescaler swallows of 0..3
// cycles, each divide-by-2/3 cell swallowing, the 1-D filter stepping up and
// down, serial loads, carrier changes) and fails for one that never did.
module tb_fracn_top;
  import tb_mash_ref_pkg::*;
  localparam int NREF = 4000, LAT = 12, NG = 8;
  localparam logic [15:0] CAR1 = 16'(26*1024 + 307);  // 90.3 x 20 MHz = 1.806 GHz
  localparam logic [15:0] CAR2 = 16'(28*1024 + 700);  // 92.68 x 20 MHz = 1.854 GHz
  localparam logic [4:0]  GAIN = 5'd19;

  logic clk_ref = 0, clk_vco = 0, rst_n = 0;
  logic data_in = 0, bit_req;
  logic ser_data = 0, ser_shift = 0, ser_load = 0;
  logic [4:0]  cp_gain;
  logic        div_pulse;
  logic signed [9:0] mod;
  logic [15:0] carrier;
  logic [5:0]  div_ctl;

  fracn_top dut (.clk_ref, .clk_vco, .rst_n, .data_in, .bit_req, .ser_data, .ser_shift,
                 .ser_load, .cp_gain, .div_pulse, .mod, .carrier, .div_ctl);

  int checks = 0, failures = 0;
  bit locked = 0;       // reference edges follow divider pulses
  int nref = 0;         // reference edges since reset release
  logic signed [9:0] m_log [NREF];
  logic [15:0] c_log [NREF + NG];
  logic [5:0]  d_log [NREF];
  int n_swallow [4];
  int n_cell [4];
  int n_load = 0, n_carrier_change = 0, n_bits = 0, n_periods = 0;
  real sum_div = 0.0;

  always #1 clk_vco = ~clk_vco;   // VCO period: 2 time units

  // reference clock: free running during reset, then slaved to the divider
  initial begin
    while (!locked) begin
      #90 clk_ref = 1;
      #90 clk_ref = 0;
    end
  end
  always @(posedge clk_vco) begin
    if (locked && div_pulse) begin
      repeat (3) @(posedge clk_vco);
      clk_ref <= 1;
      repeat (30) @(posedge clk_vco);
      clk_ref <= 0;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- VCO domain: divider period check ----
  int vcnt = 0, want_period = -1;
  always @(posedge clk_vco) begin
    if (rst_n) begin
      vcnt++;
      if (div_pulse) begin
        if (want_period >= 0) begin
          checks++;
          if (vcnt !== want_period) begin
            failures++;
            if (failures < 10) $display("divider period %0d, want %0d", vcnt, want_period);
          end
          if (nref > 200 + LAT && nref < NREF) begin
            n_periods++;
            sum_div += real'(vcnt);
          end
        end
        want_period = 64 + div_ctl;
        n_swallow[div_ctl[1:0]]++;
        for (int i = 0; i < 4; i++) if (div_ctl[i+2]) n_cell[i]++;
        vcnt = 0;
      end
    end
  end

  // ---- reference domain: log the digital path's inputs and output ----
  always @(posedge clk_ref) begin
    if (rst_n && nref < NREF) begin
      m_log[nref] = mod;
      c_log[nref] = carrier;
      d_log[nref] = div_ctl;
      if (nref > 0 && carrier != c_log[nref-1]) n_carrier_change++;
      if (bit_req) begin
        n_bits++;
        checks++;
        if (nref % 8 != 7) begin failures++; $display("bit_req at reference cycle %0d", nref); end
      end
      nref++;
    end
  end

  always @(posedge clk_ref) if (rst_n && bit_req) data_in <= 1'($urandom);

  task automatic program_word(input logic [15:0] car, input logic [4:0] gain);
    logic [20:0] w = {car, gain};
    for (int i = 20; i >= 0; i--) begin
      @(negedge clk_ref);
      ser_data = w[i]; ser_shift = 1;
    end
    @(negedge clk_ref);
    ser_shift = 0; ser_load = 1;
    @(negedge clk_ref);
    ser_load = 0;
    n_load++;
  endtask

  initial begin
    mash_state_t st;
    int unsigned want, o1, o2, o2p;
    int n_up = 0, n_down = 0;
    real sum_ref = 0.0;
    int nsum = 0;
    foreach (n_swallow[i]) n_swallow[i] = 0;
    foreach (n_cell[i]) n_cell[i] = 0;
    repeat (4) @(posedge clk_ref);
    @(negedge clk_ref);
    // release reset in the middle of a reference low phase, then lock
    @(posedge clk_vco);
    rst_n = 1;
    locked = 1;
    program_word(CAR1, GAIN);
    checks++;
    if (cp_gain !== GAIN) begin failures++; $display("gain word %0d", cp_gain); end
    wait (nref >= NREF / 2);
    program_word(CAR2, GAIN - 5'd7);
    checks++;
    if (cp_gain !== GAIN - 5'd7) begin failures++; $display("gain word %0d", cp_gain); end
    wait (nref >= NREF);
    @(posedge clk_vco);

    // word-level reference of the digital path
    mash_reset(st);
    o2p = 0;
    for (int k = -(NG-1); k + LAT < NREF; k++) begin
      logic [15:0] cm, mw, xw;
      for (int g = 0; g < NG; g++) cm[2*g +: 2] = (k + g >= 0) ? c_log[k+g][2*g +: 2] : 2'b00;
      mw = (k >= 0) ? 16'(signed'(m_log[k])) << 4 : 16'd0;
      xw = cm + mw;
      want = mash_step(st, xw, o1, o2);
      if (k < 0) continue;
      if (o2 == 1 && o2p == 0) n_up++;
      if (o2 == 0 && o2p == 1) n_down++;
      o2p = o2;
      checks++;
      if (d_log[k+LAT] !== 6'(want)) begin
        failures++;
        if (failures < 10) $display("word %0d: div_ctl %0d want %0d", k, d_log[k+LAT], want);
      end
      if (k >= 200) begin
        sum_ref += 64.0 + real'(xw) / 1024.0;
        nsum++;
      end
    end
    // average division over the run against the mean input word
    checks++;
    if (sum_div / n_periods - sum_ref / nsum > 0.05 || sum_ref / nsum - sum_div / n_periods > 0.05) begin
      failures++;
      $display("mean division %f, want %f", sum_div / n_periods, sum_ref / nsum);
    end
    $display("periods=%0d bits=%0d loads=%0d carrier_changes=%0d 1-D up=%0d down=%0d",
             n_periods, n_bits, n_load, n_carrier_change, n_up, n_down);
    $display("prescaler swallows 0..3: %0d %0d %0d %0d; cells: %0d %0d %0d %0d",
             n_swallow[0], n_swallow[1], n_swallow[2], n_swallow[3], n_cell[0], n_cell[1], n_cell[2], n_cell[3]);
    $display("mean division %f (expected %f)", sum_div / n_periods, sum_ref / nsum);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (n_swallow[i] == 0) begin failures++; $display("prescaler swallow %0d never happened", i); end
      if (n_cell[i] == 0) begin failures++; $display("cell %0d never swallowed", i); end
    end
    checks += 4;
    if (n_up == 0 || n_down == 0) begin failures++; $display("1-D filter not exercised"); end
    if (n_load < 2) begin failures++; $display("serial loads missing"); end
    if (n_carrier_change < 2) begin failures++; $display("carrier changes missing"); end
    if (n_bits < NREF / 8 - 2) begin failures++; $display("too few data bits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
