// tb_gfsk_eye: 2.5 Mb/s GFSK workload. Runs fracn_top with random data and
// an ideally locked reference clock (one reference edge per divider period)
// and passes the resulting divide values through a linear model of the
// closed-loop PLL frequency response,
//   G(s) = (1 + s/wz)/(1 + s/wcp) * 1/(1 + s/(wo Q) + s^2/wo^2),
//   fz = 11.6 kHz, fcp = 14.2 kHz, fo = 84.3 kHz, Q = 0.75,
// integrated with forward Euler at the 20 MHz reference rate. The PLL
// bandwidth is 30 times below the data rate, so without compensation the
// eye would be closed. The testbench checks, at the centre of each data bit,
// that the modelled output frequency deviation lies within 30% of the
// ideal Gaussian-filtered deviation (peak 625 kHz for modulation index 0.5)
// and has the sign of the data bit. It also reports the smallest eye
// opening. The tolerance covers the 10-bit sample resolution (one code is
// 312.5 kHz before filtering) and the sigma-delta noise.
// The compensation assumes the loop gain is tuned. To see how much a gain
// error costs, the divide values are also passed through a loop assembled
// from its parts (type-II loop filter with fz = 11.6 kHz, fp = 127 kHz,
// integrating VCO), whose gain K is set 25% low, nominal and 25% high; the
// eye must stay open by at least 30% of the ideal opening. The data are
// also sent without compensation, and that eye must be at most half the
// compensated one.
module tb_gfsk_eye;
  localparam int  NREF = 12000, OSR = 8;
  localparam real PI = 3.14159265358979;
  localparam real FREF = 20.0e6, DT = 1.0/20.0e6, TD = 400.0e-9;
  localparam real FZ = 11.6e3, FCP = 14.2e3, FO = 84.3e3, QF = 0.75;
  localparam real GSCALE [3] = '{0.75, 1.0, 1.25};
  localparam real DEV = 625.0e3;             // peak deviation, h = 0.5 at 2.5 Mb/s
  localparam logic [15:0] CAR = 16'(26*1024 + 307);

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
  bit locked = 0;
  int nref = 0;
  logic [5:0] d_log [NREF];
  bit         bits [NREF / OSR + 8];
  int         bit_cycle [NREF / OSR + 8];  // reference cycle at which the bit was taken
  int         nbits = 0;
  real        fl [NREF];                   // output of the loop model below

  always #1 clk_vco = ~clk_vco;
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
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_ref) begin
    if (rst_n && nref < NREF) begin
      d_log[nref] = div_ctl;
      if (bit_req) begin
        bits[nbits] = data_in;
        bit_cycle[nbits] = nref;
        nbits++;
      end
      nref++;
    end
  end
  always @(posedge clk_ref) if (rst_n && bit_req) data_in <= 1'($urandom);

  // ideal GFSK frequency pulse: one-bit rectangle convolved with the BT = 0.5 Gaussian
  function automatic real gauss(real x);
    real s = $sqrt($ln(2.0)) / (2.0 * PI * 0.5) * TD;
    return $exp(-x*x/(2.0*s*s)) / ($sqrt(2.0*PI) * s);
  endfunction
  function automatic real pulse(real t);
    int n = 200;
    real a = t - TD/2.0, h = TD / 200.0, acc = 0.0;
    for (int i = 0; i <= n; i++) begin
      real w = (i == 0 || i == n) ? 1.0 : ((i % 2) ? 4.0 : 2.0);
      acc += w * gauss(a + i*h);
    end
    return acc * h / 3.0;
  endfunction

  // Closed loop built from the loop parts instead of the fitted G(s): open
  // loop A(s) = K (1 + s/wz) / (s^2 (1 + s/wp)), fp = 127 kHz, closed loop
  // A/(1+A). With K = Kn = wcp*wo^2/wp this equals G(s) above exactly; a
  // loop gain error scales K. Simulated in controllable canonical form.
  task automatic run_loop(input real gscale, input int start, input real nom);
    real wp, wz, k, a0, a1, a2, x1, x2, x3, x3d, u;
    wp = 2.0*PI*127.0e3; wz = 2.0*PI*FZ;
    k  = gscale * (2.0*PI*FCP) * (2.0*PI*FO) * (2.0*PI*FO) / wp;
    a2 = wp; a1 = k*wp/wz; a0 = k*wp;
    x1 = 0.0; x2 = 0.0; x3 = 0.0;
    for (int t = 0; t < NREF; t++) begin
      u   = (t >= start) ? (64.0 + real'(d_log[t]) - nom) * FREF : 0.0;
      x3d = u - a0*x1 - a1*x2 - a2*x3;
      fl[t] = a0*x1 + a1*x2;
      x1 = x1 + DT * x2;
      x2 = x2 + DT * x3;
      x3 = x3 + DT * x3d;
    end
  endtask

  // smallest eye opening of fl at the bit centres
  task automatic eye_of_loop(input int start, output real opening);
    real mn1 = 1.0e12, mx0 = -1.0e12;
    for (int n = 8; n + 8 < nbits; n++) begin
      int tc;
      tc = bit_cycle[n] + 1 + 2*OSR + 1 + 12;
      if (tc < start + 4000 || tc >= NREF) continue;
      if (bits[n] && fl[tc] < mn1) mn1 = fl[tc];
      if (!bits[n] && fl[tc] > mx0) mx0 = fl[tc];
    end
    opening = mn1 - mx0;
  endtask

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
  endtask

  initial begin
    real wo, wz, wcp, x, xd, y, u, xdd, nom;
    real f_out [NREF];
    real min_one, max_zero, worst;
    int  start, t_first_bit, nchk;
    repeat (4) @(posedge clk_ref);
    @(negedge clk_ref);
    @(posedge clk_vco);
    rst_n = 1;
    locked = 1;
    program_word(CAR, 5'd31);
    wait (nref >= NREF);
    @(posedge clk_vco);

    // closed-loop frequency response, driven by the divide value deviation
    wo = 2.0*PI*FO; wz = 2.0*PI*FZ; wcp = 2.0*PI*FCP;
    nom = 64.0 + real'(CAR) / 1024.0;
    start = 200;                       // carrier loaded and pipeline filled well before
    x = 0.0; xd = 0.0; y = 0.0;
    for (int t = 0; t < NREF; t++) begin
      u   = (t >= start) ? (64.0 + real'(d_log[t]) - nom) * FREF : 0.0;
      xdd = wo*wo*(u - x) - (wo/QF)*xd;
      y   = y + DT * wcp*(x + xd/wz - y);
      x   = x + DT * xd;
      xd  = xd + DT * xdd;
      f_out[t] = y;
    end

    // compare at bit centres with the ideal Gaussian-filtered deviation.
    // Bit n enters the filter ROM history at cycle bit_cycle[n] + 1; its pulse
    // centre is (SPAN-1)/2 + 1/2 bit periods later in the ROM address, then the
    // ROM register (1 cycle) and the digital path (12 cycles) follow.
    min_one = 1.0e12; max_zero = -1.0e12; worst = 0.0; nchk = 0;
    for (int n = 8; n + 8 < nbits; n++) begin
      int tc;
      real ideal, err;
      tc = bit_cycle[n] + 1 + 2*OSR + 1 + 12;   // cycle of the bit centre at the divider
      if (tc < start + 4000 || tc >= NREF) continue;  // let the loop settle first
      ideal = 0.0;
      for (int j = -3; j <= 3; j++)
        ideal += (bits[n+j] ? 1.0 : -1.0) * DEV * pulse(-j*TD);
      err = f_out[tc] - ideal;
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      checks++;
      if (err > 0.3 * DEV || (bits[n] ? f_out[tc] <= 0.0 : f_out[tc] >= 0.0)) begin
        failures++;
        if (failures < 10) $display("bit %0d (%0d): deviation %0.0f Hz, ideal %0.0f Hz", n, bits[n], f_out[tc], ideal);
      end
      if (bits[n] && f_out[tc] < min_one) min_one = f_out[tc];
      if (!bits[n] && f_out[tc] > max_zero) max_zero = f_out[tc];
      nchk++;
    end
    $display("bits checked %0d, worst error %0.0f Hz, eye opening %0.0f Hz (ideal about %0.0f)",
             nchk, worst, min_one - max_zero, 2.0 * DEV);
    checks++;
    if (nchk < 100) begin failures++; $display("too few bits checked"); end


    // the same divide values through the loop built from its parts: at the
    // nominal gain its eye must agree with that of G(s); with the open-loop
    // gain 25% off the eye must stay open by at least 30% of the ideal 2*DEV
    begin
      real op;
      run_loop(1.0, start, nom);
      eye_of_loop(start, op);
      $display("loop model at nominal gain: eye opening %0.0f Hz (G(s): %0.0f Hz)", op, min_one - max_zero);
      checks++;
      if (op - (min_one - max_zero) > 0.05 * DEV || (min_one - max_zero) - op > 0.05 * DEV) begin
        failures++;
        $display("loop model does not match G(s)");
      end
      foreach (GSCALE[i]) begin
        run_loop(GSCALE[i], start, nom);
        eye_of_loop(start, op);
        $display("open-loop gain x%0.2f: eye opening %0.0f Hz", GSCALE[i], op);
        checks++;
        if (op < 0.3 * 2.0 * DEV) begin failures++; $display("eye closed with gain x%0.2f", GSCALE[i]); end
      end
    end

    // the same data without compensation: the ideal GFSK deviation sent
    // straight through G(s). Its eye must be far more closed.
    begin
      real ue [NREF];
      real umin_one, umax_zero;
      int  bi;
      for (int t = 0; t < NREF; t++) ue[t] = 0.0;
      for (int n = 0; n < nbits; n++) begin
        int tcn;
        tcn = bit_cycle[n] + 1 + 2*OSR + 1 + 12;
        for (int t = tcn - 3*OSR; t <= tcn + 3*OSR; t++)
          if (t >= start && t < NREF) ue[t] += (bits[n] ? 1.0 : -1.0) * DEV * pulse((t - tcn) * DT);
      end
      x = 0.0; xd = 0.0; y = 0.0;
      for (int t = 0; t < NREF; t++) begin
        xdd = wo*wo*(ue[t] - x) - (wo/QF)*xd;
        y   = y + DT * wcp*(x + xd/wz - y);
        x   = x + DT * xd;
        xd  = xd + DT * xdd;
        f_out[t] = y;
      end
      umin_one = 1.0e12; umax_zero = -1.0e12;
      for (int n = 8; n + 8 < nbits; n++) begin
        int tc;
        tc = bit_cycle[n] + 1 + 2*OSR + 1 + 12;
        if (tc < start + 4000 || tc >= NREF) continue;
        if (bits[n] && f_out[tc] < umin_one) umin_one = f_out[tc];
        if (!bits[n] && f_out[tc] > umax_zero) umax_zero = f_out[tc];
      end
      $display("without compensation the eye opening would be %0.0f Hz", umin_one - umax_zero);
      checks++;
      if (umin_one - umax_zero > 0.5 * (min_one - max_zero)) begin
        failures++;
        $display("compensation does not open the eye");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
