// tb_divider_64: sets a new random 6-bit control word after each output
// pulse and checks that the period starting at a pulse lasts 64 + D input
// cycles, D being the word present at that pulse. Each control bit must
// have been used both ways.
module tb_divider_64;
  logic clk = 0, rst_n = 0;
  logic [5:0] dctl = 0;
  logic div_pulse;
  int checks = 0, failures = 0;
  int cnt, want;
  int ones [6];

  divider_64 dut (.clk, .rst_n, .dctl, .div_pulse);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int np;
    foreach (ones[i]) ones[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cnt = 0; want = -1; np = 0;
    while (np < 400) begin
      #1;
      cnt++;
      if (div_pulse) begin
        if (want >= 0) begin
          checks++;
          if (cnt !== want) begin
            failures++;
            if (failures < 10) $display("pulse %0d: period %0d want %0d", np, cnt, want);
          end
        end
        want = 64 + dctl;
        for (int i = 0; i < 6; i++) if (dctl[i]) ones[i]++;
        cnt = 0;
        np++;
        @(posedge clk); #1;
        dctl = (np < 4) ? 6'(np == 1 ? 0 : 63) : 6'($urandom);
        continue;
      end
      @(posedge clk);
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (ones[i] == 0 || ones[i] == np) begin failures++; $display("bit %0d not exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
