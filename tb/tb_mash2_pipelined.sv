// tb_mash2_pipelined: drives skewed 16-bit words into the pipelined MASH,
// reassembles the skewed 6-bit output and checks every output word against
// the word-level MASH model. Also checks the pipeline latency of the top
// output group and that both the +1 and the -1 effect of the 1-D filter on
// out2 occurred.
module tb_mash2_pipelined;
  import tb_mash_ref_pkg::*;
  localparam int W = 16, FB = 10, G = 2, NG = W / G, OW = 6, N = 2000;
  localparam int FBG = FB / G;
  localparam int LAT = 3;  // cycles from group g of d to group g of y (same bit position)
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d;
  logic [OW-1:0] y;
  logic [W-1:0] wx [N];
  logic [OW-1:0] got [N];
  int checks = 0, failures = 0, n_up = 0, n_down = 0;

  mash2_pipelined dut (.clk, .rst_n, .d, .y);

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
    int unsigned want, o1, o2, o2p;
    foreach (wx[i]) wx[i] = (i < N/2) ? 16'(26*1024 + 333) : W'(20*1024 + ($urandom % 12000));
    d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < N + NG + LAT + 2; t++) begin
      for (int g = 0; g < NG; g++)
        d[g*G +: G] = (t - g >= 0 && t - g < N) ? wx[t-g][g*G +: G] : '0;
      #1;
      // output group j (bit position FB + j*G) of word k shows in cycle k + FBG + j + LAT
      for (int j = 0; j < OW / G; j++) begin
        int k;
        k = t - (FBG + j + LAT);
        if (k >= 0 && k < N) got[k][j*G +: G] = y[j*G +: G];
      end
      @(posedge clk); #1;
    end
    mash_reset(st);
    o2p = 0;
    for (int k = 0; k < N; k++) begin
      want = mash_step(st, wx[k], o1, o2);
      if (o2 == 1 && o2p == 0) n_up++;
      if (o2 == 0 && o2p == 1) n_down++;
      o2p = o2;
      checks++;
      if (got[k] !== OW'(want)) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d want %0d", k, got[k], want);
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0) begin failures++; $display("1-D filter not exercised both ways"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
