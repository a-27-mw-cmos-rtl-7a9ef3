// tb_digital_path: applies random signed modulation samples and a carrier
// word, and checks every 6-bit divide control word against the word-level
// MASH model fed with carrier + (sign-extended modulation << 4). It also
// checks the latency of 12 clocks, changes the carrier while running (the
// words in flight then take the new carrier group by group, since the
// carrier is not pipe-shifted) and checks the average divide value.
module tb_digital_path;
  import tb_mash_ref_pkg::*;
  localparam int N = 3000, LAT = 12, NG = 8;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] mod;
  logic [15:0] carrier;
  logic [5:0]  div_ctl;
  logic signed [9:0] wm [N];
  logic [15:0] wc [N + NG];
  logic [5:0]  got [N];
  int checks = 0, failures = 0;

  digital_path dut (.clk, .rst_n, .mod, .carrier, .div_ctl);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mash_state_t st;
    int unsigned want, o1, o2, x;
    real sum_hw, sum_ref;
    for (int i = 0; i < N; i++) wm[i] = (i < 200) ? 10'sd0 : 10'($urandom_range(0, 600) - 300);
    for (int i = 0; i < N + NG; i++) wc[i] = (i < N/2) ? 16'(26*1024 + 517) : 16'(30*1024 + 101);
    mod = '0; carrier = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < N + LAT; t++) begin
      mod     = (t < N) ? wm[t] : '0;
      carrier = wc[(t < N + NG) ? t : N + NG - 1];
      #1;
      if (t - LAT >= 0) got[t-LAT] = div_ctl;
      @(posedge clk); #1;
    end
    // reference: word k takes group g of the carrier present in cycle k+g.
    // Words k < 0 straddle the reset release: only their groups processed
    // after it (k+g >= 0) count, the others are zero.
    mash_reset(st);
    sum_hw = 0; sum_ref = 0;
    for (int k = -(NG-1); k < N; k++) begin
      logic [15:0] cm, mw, xw;
      for (int g = 0; g < NG; g++) cm[2*g +: 2] = (k + g >= 0) ? wc[k+g][2*g +: 2] : 2'b00;
      mw = (k >= 0) ? 16'(signed'(wm[k])) << 4 : 16'd0;
      xw = cm + mw;
      x  = xw;
      want = mash_step(st, x, o1, o2);
      if (k < 0) continue;
      checks++;
      if (got[k] !== 6'(want)) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d want %0d", k, got[k], want);
      end
      if (k >= 200 && k < N/2) begin
        sum_hw  += real'(got[k]);
        sum_ref += real'(xw) / 1024.0;
      end
    end
    // the average divide control equals the average input word / 1024
    checks++;
    if ((sum_hw - sum_ref) > 2.0 || (sum_ref - sum_hw) > 2.0) begin
      failures++;
      $display("average mismatch: %f vs %f", sum_hw, sum_ref);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
