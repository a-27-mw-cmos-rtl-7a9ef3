// tb_div23_cell: drives a divide-by-2/3 cell with input pulses spaced by
// random gaps. With mod_in high at every output pulse (as for the last cell
// of a chain) and p set, the cell must count 3 input pulses per output pulse,
// otherwise 2. With mod_in low the cell must never swallow. mod_out must
// equal mod_in at output pulses only.
module tb_div23_cell;
  logic clk = 0, rst_n = 0;
  logic in_pulse = 0, p = 0, mod_in = 0, out_pulse, mod_out;
  int checks = 0, failures = 0;
  int n_in, want, n_swallow = 0;

  div23_cell dut (.clk, .rst_n, .in_pulse, .p, .mod_in, .out_pulse, .mod_out);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    want = 0;   // after reset the first pulse passes straight through
    n_in = 0;
    for (int per = 0; per < 300; per++) begin
      // choose controls for the decision made at this period's end
      p      = 1'($urandom);
      mod_in = (per % 5 != 4);
      forever begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 in_pulse = 1;
        n_in++;
        #1;
        checks++;
        if (mod_out !== (mod_in && out_pulse)) begin
          failures++; $display("mod_out wrong");
        end
        if (out_pulse) begin
          if (per > 0) begin
            checks++;
            if (n_in !== want) begin
              failures++;
              if (failures < 10) $display("period %0d: %0d input pulses, want %0d", per, n_in, want);
            end
          end
          want = (p && mod_in) ? 3 : 2;
          if (want == 3) n_swallow++;
          n_in = 0;
          @(posedge clk); #1 in_pulse = 0;
          break;
        end
        @(posedge clk); #1 in_pulse = 0;
      end
    end
    checks++;
    if (n_swallow == 0) begin failures++; $display("no swallow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
