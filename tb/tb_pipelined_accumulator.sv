// tb_pipelined_accumulator: drives skewed input words into a 16-bit
// accumulator with 10 fed-back bits and checks every registered output word
// (state and upper output bits) against a word-level first-order
// sigma-delta stage.
module tb_pipelined_accumulator;
  localparam int W = 16, FB = 10, G = 2, NG = W / G, N = 400;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] wx [N], got [N];
  int checks = 0, failures = 0, carries = 0;

  pipelined_accumulator #(.W(W), .FB_W(FB), .G(G)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e, s, want;
    foreach (wx[i]) wx[i] = W'($urandom);
    d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < N + NG + 1; t++) begin
      for (int g = 0; g < NG; g++)
        d[g*G +: G] = (t - g >= 0 && t - g < N) ? wx[t-g][g*G +: G] : '0;
      @(posedge clk); #1;
      // after this edge, group g of word t-g is in q
      for (int g = 0; g < NG; g++)
        if (t - g >= 0 && t - g < N) got[t-g][g*G +: G] = q[g*G +: G];
    end
    e = 0;
    for (int k = 0; k < N; k++) begin
      s = e + wx[k];
      if (((s >> FB) & 32'h3F) != ((wx[k] >> FB) & 32'h3F)) carries++;
      want = s & 32'hFFFF;
      e = s & 32'h3FF;
      checks++;
      if (got[k] !== W'(want)) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0h want %0h", k, got[k], want);
      end
    end
    checks++;
    if (carries == 0) begin failures++; $display("no carry out of the fed-back bits seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
