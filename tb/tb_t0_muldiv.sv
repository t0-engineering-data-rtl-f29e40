// tb_t0_muldiv: random signed and unsigned multiplies and divides checked
// against SystemVerilog arithmetic, plus the latency: after the clock edge that
// accepts mul_start/div_start, busy must stay high until hi/lo hold the result,
// 18 edges for a multiply and 33 for a divide.  Also checks mthi/mtlo, the
// divide-by-zero result this design chose, and that a new start abandons the
// operation in progress.
module tb_t0_muldiv;
  logic clk = 1'b0, rst = 1'b1;
  logic mul_start = 0, div_start = 0, is_signed = 0, mthi = 0, mtlo = 0;
  logic [31:0] a = 0, b = 0, wdata = 0, hi, lo;
  logic busy;
  int checks = 0, failures = 0;

  t0_muldiv dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // run one operation; returns the number of edges until busy falls
  task automatic run(input logic mul, input logic sg, input logic [31:0] x, input logic [31:0] y,
                     output int lat);
    @(negedge clk);
    mul_start = mul; div_start = !mul; is_signed = sg; a = x; b = y;
    @(negedge clk);
    mul_start = 0; div_start = 0; a = $urandom; b = $urandom; is_signed = $urandom;
    lat = 1;
    while (busy && lat < 100) begin
      @(negedge clk);
      lat++;
    end
  endtask

  function automatic logic [63:0] mul_ref(input logic sg, input logic [31:0] x, input logic [31:0] y);
    if (sg) return 64'($signed(x)) * 64'($signed(y));
    return {32'b0, x} * {32'b0, y};
  endfunction

  initial begin
    int lat;
    logic [31:0] x, y, q, r;
    logic sg;
    logic [63:0] p;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!busy, "idle after reset");
    for (int i = 0; i < 300; i++) begin
      x = $urandom; y = $urandom; sg = $urandom;
      if (i % 4 == 1) x = x >> ($urandom % 32);
      if (i % 4 == 2) y = y >> ($urandom % 32);
      if (i == 3) begin x = 32'h8000_0000; y = 32'h8000_0000; end
      if (i == 4) begin x = 32'hFFFF_FFFF; y = 32'hFFFF_FFFF; end
      run(1'b1, sg, x, y, lat);
      p = mul_ref(sg, x, y);
      check(lat == 18, $sformatf("mult latency %0d", lat));
      check({hi, lo} == p, $sformatf("mult %0d %h*%h = %h got %h", sg, x, y, p, {hi, lo}));
      if (y == 0) y = 1;
      if (i == 5) begin x = 32'h8000_0000; y = 32'hFFFF_FFFF; sg = 0; end
      if (i == 6) begin x = 32'h8000_0001; y = 32'h0000_0007; sg = 1; end
      run(1'b0, sg, x, y, lat);
      if (sg) begin
        q = $signed(x) / $signed(y);
        r = $signed(x) % $signed(y);
      end else begin
        q = x / y;
        r = x % y;
      end
      check(lat == 33, $sformatf("div latency %0d", lat));
      check(lo == q && hi == r, $sformatf("div %0d %h/%h = %h r %h got %h r %h", sg, x, y, q, r, lo, hi));
    end
    // divide by zero (own choice): quotient all ones, remainder = dividend
    run(1'b0, 1'b0, 32'd1234, 32'd0, lat);
    check(lo == 32'hFFFF_FFFF && hi == 32'd1234, "divide by zero");
    // mthi / mtlo
    @(negedge clk); mthi = 1; wdata = 32'hCAFE_0001;
    @(negedge clk); mthi = 0; mtlo = 1; wdata = 32'hBEEF_0002;
    @(negedge clk); mtlo = 0;
    check(hi == 32'hCAFE_0001 && lo == 32'hBEEF_0002, "mthi/mtlo");
    // restart abandons previous: div then mult after 5 cycles
    @(negedge clk); div_start = 1; a = 100; b = 7; is_signed = 0;
    @(negedge clk); div_start = 0;
    repeat (4) @(negedge clk);
    run(1'b1, 1'b0, 32'd6, 32'd7, lat);
    check(lat == 18 && lo == 42 && hi == 0, "new start abandons old operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
