// tb_divider_8: the eight-modulus example divider, three divide-by-2/3
// cells in cascade with the end-of-period signal fed back from the output
// cell to the input cell. With an input pulse every clock it must divide by
// 8 + D0 + 2*D1 + 4*D2, D sampled at each output pulse; all eight moduli
// are exercised.
module tb_divider_8;
  logic clk = 0, rst_n = 0;
  logic [2:0] dsel = 0;
  logic [3:0] pulse;
  logic [2:0] modsig;
  int checks = 0, failures = 0;
  int seen [8];

  assign pulse[0] = rst_n;   // one input cycle per clock
  for (genvar i = 0; i < 3; i++) begin : g_cell
    div23_cell u_cell (.clk, .rst_n, .in_pulse(pulse[i]), .p(dsel[i]),
                       .mod_in(i == 2 ? 1'b1 : modsig[(i == 2) ? 2 : i + 1]),
                       .out_pulse(pulse[i+1]), .mod_out(modsig[i]));
  end

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, want, np;
    foreach (seen[i]) seen[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cnt = 0; want = -1; np = 0;
    while (np < 500) begin
      #1;
      cnt++;
      if (pulse[3]) begin
        if (want >= 0) begin
          checks++;
          if (cnt !== want) begin
            failures++;
            if (failures < 10) $display("period %0d, want %0d", cnt, want);
          end
        end
        want = 8 + dsel;
        seen[dsel]++;
        cnt = 0;
        np++;
        @(posedge clk); #1;
        dsel = 3'($urandom);
        continue;
      end
      @(posedge clk);
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("modulus %0d never used", 8 + i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
