// tb_t0_hpm: drives random event inputs and checks that each pad shows the
// event of the previous cycle, with the vector busy bits cleared in a cycle
// with a vector memory stall.
module tb_t0_hpm;
  logic clk = 1'b0;
  logic [7:0] ev, hpm;
  int checks = 0, failures = 0;

  t0_hpm dut (.clk, .exception(ev[0]), .cpumemstall(ev[1]), .interlock(ev[2]),
              .miss(ev[3]), .vp0busy(ev[4]), .vp1busy(ev[5]), .vmpbusy(ev[6]),
              .vumemstall(ev[7]), .hpm);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    int stalls;
    stalls = 0;
    ev = '0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      ev = 8'($urandom);
      exp = ev;
      if (ev[7]) begin exp[6:4] = 3'b000; stalls++; end
      @(posedge clk); #1;
      checks++;
      if (hpm !== exp) begin
        failures++;
        $display("cycle %0d: ev=%b hpm=%b exp=%b", i, ev, hpm, exp);
      end
      @(negedge clk);
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
