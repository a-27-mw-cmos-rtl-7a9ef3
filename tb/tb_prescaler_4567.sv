// tb_prescaler_4567: checks the divide-by-4/5/6/7 stage. The testbench plays
// the role of the divide-by-2/3 chain: it raises mod_in at every third
// output pulse. Each period that starts at a pulse with mod_in high must last
// 4 + d input cycles, all others 4. It also checks that the four phases lag
// each other by one cycle and that the selected phase has exactly one
// rising edge per period (no glitch from the phase moves).
module tb_prescaler_4567;
  logic clk = 0, rst_n = 0;
  logic [1:0] d = 0;
  logic mod_in, out_pulse, mux_out;
  logic [3:0] phase, phase_q;
  int checks = 0, failures = 0;
  int cnt, want, npulse, rises;
  int seen [4];

  prescaler_4567 dut (.clk, .rst_n, .d, .mod_in, .out_pulse, .phase, .mux_out);

  assign mod_in = out_pulse && (npulse % 3 == 2);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic mux_prev;
    npulse = 0; cnt = 0; want = -1; rises = 0;
    foreach (seen[i]) seen[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    mux_prev = 0;
    phase_q = phase;
    for (int t = 0; t < 4000; t++) begin
      #1;
      // phase k+1 is phase k delayed by one cycle
      if (t > 0) begin
        checks++;
        if (phase !== {phase_q[2:0], phase_q[3]}) begin
          failures++;
          if (failures < 10) $display("t=%0d phases %b after %b", t, phase, phase_q);
        end
      end
      if (mux_out && !mux_prev) rises++;
      cnt++;
      if (out_pulse) begin
        if (want >= 0) begin
          checks++;
          if (cnt !== want || rises !== 1) begin
            failures++;
            if (failures < 10) $display("t=%0d period %0d rises %0d, want %0d", t, cnt, rises, want);
          end
        end
        want = mod_in ? 4 + d : 4;
        if (mod_in) seen[d]++;
        cnt = 0;
        rises = 0;
      end
      mux_prev = mux_out;
      phase_q  = phase;
      @(posedge clk);
      #1;
      if (cnt == 0) npulse++;   // count the pulse only after the edge that used mod_in
      if (out_pulse == 0 && cnt == 1) d = 2'($urandom);  // change d away from the pulse
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("swallow of %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
