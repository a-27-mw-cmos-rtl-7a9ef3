// tb_align_shift: feeds skewed words (group g of word k in cycle k+g) and
// checks that each word leaves align_shift complete in cycle k+NG-1.
module tb_align_shift;
  localparam int W = 6, G = 2, NG = W / G, N = 300;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] words [N];
  int checks = 0, failures = 0;

  align_shift #(.W(W), .G(G)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (words[i]) words[i] = W'($urandom);
    d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < N; t++) begin
      for (int g = 0; g < NG; g++)
        d[g*G +: G] = (t - g >= 0) ? words[t-g][g*G +: G] : '0;
      #1;
      if (t - (NG - 1) >= 0) begin
        checks++;
        if (q !== words[t-(NG-1)]) begin
          failures++;
          if (failures < 10) $display("t=%0d: got %0h want %0h", t, q, words[t-(NG-1)]);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
