// tb_serial_register: shifts random 21-bit control words in MSB first and
// checks, after each load pulse, that the carrier and gain outputs hold the
// two fields and that shifting alone leaves the outputs unchanged.
module tb_serial_register;
  logic clk = 0, rst_n = 0;
  logic sdata = 0, shift = 0, load = 0;
  logic [15:0] carrier;
  logic [4:0]  gain;
  int checks = 0, failures = 0;

  serial_register dut (.clk, .rst_n, .sdata, .shift, .load, .carrier, .gain);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] w, prev;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (carrier !== 0 || gain !== 0) begin failures++; $display("reset values wrong"); end
    prev = '0;
    for (int n = 0; n < 50; n++) begin
      w = 21'($urandom);
      for (int i = 20; i >= 0; i--) begin
        sdata = w[i]; shift = 1;
        @(posedge clk); #1;
        shift = 0;
        if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end  // idle gaps
        checks++;
        if ({carrier, gain} !== prev) begin failures++; $display("output moved while shifting"); end
      end
      load = 1;
      @(posedge clk); #1;
      load = 0;
      checks++;
      if (carrier !== w[20:5] || gain !== w[4:0]) begin
        failures++;
        $display("word %0d: got %h/%h want %h/%h", n, carrier, gain, w[20:5], w[4:0]);
      end
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
