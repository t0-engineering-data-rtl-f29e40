// tb_t0_clkgen: checks that phi toggles on every rising edge of clk2xin (half
// the input frequency, 50% duty cycle) and that clkout is always ~phi.
module tb_t0_clkgen;
  logic clk2xin = 1'b0, phi, clkout;
  int checks = 0, failures = 0;

  t0_clkgen dut (.clk2xin, .phi, .clkout);

  always #5 clk2xin = ~clk2xin;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    int   hi_cnt, lo_cnt;
    hi_cnt = 0; lo_cnt = 0;
    @(posedge clk2xin); #1;
    prev = phi;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk2xin); #1;
      checks++;
      if (phi == prev) begin failures++; $display("phi did not toggle at edge %0d", i); end
      checks++;
      if (clkout != ~phi) begin failures++; $display("clkout != ~phi"); end
      if (phi) hi_cnt++; else lo_cnt++;
      prev = phi;
    end
    checks++;
    if (hi_cnt != lo_cnt) begin failures++; $display("duty %0d/%0d", hi_cnt, lo_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
