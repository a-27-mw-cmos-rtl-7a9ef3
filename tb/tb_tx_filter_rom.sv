// tb_tx_filter_rom: feeds random data bits to the compensated transmit
// filter and checks every output sample against the filter computed here
// with real arithmetic: for each of the last four bits, the Gaussian
// frequency pulse (BT = 0.5) plus its first and second derivatives weighted
// by the inverse of the closed-loop PLL response (fo = 84.3 kHz, Q = 0.75),
// scaled by fz/fcp = 11.6/14.2 and by the deviation h/(2 Td fref),
// h = 0.5, Td = 400 ns, fref = 20 MHz, in units of 2^-6. The pulse is
// integrated numerically (Simpson's rule) rather than through erf. A sample
// may differ by one code from the rounded exact value. It also checks that
// a bit is taken every 8 clocks.
module tb_tx_filter_rom;
  localparam int OSR = 8, SPAN = 4;
  localparam real PI = 3.14159265358979;
  localparam real TD = 400.0e-9, TS = 50.0e-9, FO = 84.3e3, QF = 0.75;
  localparam real FZ = 11.6e3, FCP = 14.2e3, H = 0.5, FREF = 20.0e6, LSB = 1.0/64.0;
  logic clk = 0, rst_n = 0;
  logic data_in = 0, bit_req;
  logic signed [9:0] mod;
  int checks = 0, failures = 0, maxcode = 0;

  tx_filter_rom dut (.clk, .rst_n, .data_in, .bit_req, .mod);

  always #5 clk = ~clk;

  function automatic real sigma();
    return $sqrt($ln(2.0)) / (2.0 * PI * 0.5) * TD;
  endfunction
  function automatic real gauss(real x);
    real s = sigma();
    return $exp(-x*x/(2.0*s*s)) / ($sqrt(2.0*PI) * s);
  endfunction
  function automatic real dgauss(real x);
    real s = sigma();
    return -x / (s*s) * gauss(x);
  endfunction
  function automatic real pulse(real t);   // rect(Td) * gaussian, integrated
    int n = 400;
    real a = t - TD/2.0, hstep = TD / 400.0, acc = 0.0;
    for (int i = 0; i <= n; i++) begin
      real w = (i == 0 || i == n) ? 1.0 : ((i % 2) ? 4.0 : 2.0);
      acc += w * gauss(a + i*hstep);
    end
    return acc * hstep / 3.0;
  endfunction
  function automatic real wc(real t);
    real g0 = pulse(t);
    real g1 = gauss(t + TD/2.0) - gauss(t - TD/2.0);
    real g2 = dgauss(t + TD/2.0) - dgauss(t - TD/2.0);
    return (FZ/FCP) * (g0 + g1/(2.0*PI*FO*QF) + g2/((2.0*PI*FO)*(2.0*PI*FO)));
  endfunction
  function automatic real expected(logic [SPAN-1:0] hist, int ph);
    real dev = H / (2.0*TD*FREF), s = 0.0;
    for (int j = 0; j < SPAN; j++) begin
      real tc = (j - (SPAN-1)/2.0)*TD + (ph + 0.5)*TS - TD/2.0;
      s += (hist[j] ? 1.0 : -1.0) * dev * wc(tc);
    end
    return s / LSB;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SPAN-1:0] hist;
    int ph, since_req;
    real e;
    hist = '0; ph = 0; since_req = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 8 * 300; t++) begin
      data_in = 1'($urandom);
      #1;
      if (bit_req) begin
        checks++;
        if (t % OSR != OSR - 1) begin failures++; $display("bit_req at cycle %0d", t); end
      end
      e = expected(hist, ph);
      @(posedge clk); #1;
      // mod now shows the address {hist, ph} of the cycle just ended
      checks++;
      if ($itor(mod) - e > 1.0 || e - $itor(mod) > 1.0) begin
        failures++;
        if (failures < 10) $display("t=%0d hist=%b ph=%0d: got %0d want %f", t, hist, ph, mod, e);
      end
      if (mod > maxcode) maxcode = mod;
      if (ph == OSR - 1) hist = {hist[SPAN-2:0], data_in};
      ph = (ph + 1) % OSR;
    end
    // the compensated pulse is much larger than the plain deviation (about 1.6 codes)
    checks++;
    if (maxcode < 100) begin failures++; $display("compensation peak too small: %0d", maxcode); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
