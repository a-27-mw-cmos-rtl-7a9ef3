// tb_pipe_shift: checks that group g of each word leaves pipe_shift exactly
// g cycles after the word entered.
module tb_pipe_shift;
  localparam int W = 16, G = 2, NG = W / G, N = 300;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] words [N];
  int checks = 0, failures = 0;

  pipe_shift #(.W(W), .G(G)) dut (.clk, .rst_n, .d, .q);

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
      d = words[t];
      #1;  // let combinational group 0 settle
      for (int g = 0; g < NG; g++) begin
        if (t - g >= 0) begin
          checks++;
          if (q[g*G +: G] !== words[t-g][g*G +: G]) begin
            failures++;
            if (failures < 10) $display("t=%0d group %0d: got %0h want %0h", t, g, q[g*G +: G], words[t-g][g*G +: G]);
          end
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
