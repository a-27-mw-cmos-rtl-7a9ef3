// tb_pipelined_adder: drives skewed operand words into pipelined_adder,
// gathers the skewed sum groups and checks each word's sum and carry out
// against a + b + cin.
module tb_pipelined_adder;
  localparam int W = 16, G = 2, NG = W / G, N = 400;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  logic [W-1:0] wa [N], wb [N], got [N];
  logic         wc [N], gotc [N];
  int checks = 0, failures = 0;

  pipelined_adder #(.W(W), .G(G)) dut (.clk, .rst_n, .a, .b, .cin, .s, .cout);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] want;
    foreach (wa[i]) begin
      wa[i] = W'($urandom); wb[i] = W'($urandom); wc[i] = 1'($urandom);
      if (i % 7 == 0) begin wa[i] = '1; wb[i] = '0; wc[i] = 1'b1; end  // full carry ripple
    end
    a = '0; b = '0; cin = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < N + NG; t++) begin
      for (int g = 0; g < NG; g++) begin
        a[g*G +: G] = (t - g >= 0 && t - g < N) ? wa[t-g][g*G +: G] : '0;
        b[g*G +: G] = (t - g >= 0 && t - g < N) ? wb[t-g][g*G +: G] : '0;
      end
      cin = (t < N) ? wc[t] : 1'b0;
      #1;
      for (int g = 0; g < NG; g++)
        if (t - g >= 0 && t - g < N) got[t-g][g*G +: G] = s[g*G +: G];
      if (t - (NG-1) >= 0 && t - (NG-1) < N) gotc[t-(NG-1)] = cout;
      @(posedge clk); #1;
    end
    for (int k = 0; k < N; k++) begin
      want = {1'b0, wa[k]} + {1'b0, wb[k]} + (W+1)'(wc[k]);
      checks++;
      if ({gotc[k], got[k]} !== want) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0h want %0h", k, {gotc[k], got[k]}, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
