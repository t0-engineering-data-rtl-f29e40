// tb_t0_vdispatch: random vector arithmetic requests with random unit
// occupancy and stalls, checked every cycle against a reference model of the
// dispatch rules: multiplies only to VP0, other operations to VP1 first, no
// issue to a busy unit, vue for vlr > 32, and the two-cycle chaining delay
// (a read of a register written by an instruction issued one or two unstalled
// cycles earlier is held).  Also checks that every outcome occurred.
module tb_t0_vdispatch;
  logic clk = 1'b0, rst = 1'b1;
  logic stall = 0, req_valid = 0, req_mul = 0;
  logic [3:0] req_vs = 0, req_vt = 0, req_vd = 0;
  logic req_rd_vs = 0, req_rd_vt = 0, req_rd_vd = 0, req_wr_vd = 0;
  logic [7:0] vlr = 8;
  logic [1:0] vp_busy = 0;
  logic go_vp0, go_vp1, interlock, vue;
  int checks = 0, failures = 0;
  int n_go0, n_go1, n_raw, n_vue, n_busy;

  t0_vdispatch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 12) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    logic [4:0] h [2];    // {valid, reg} one and two unstalled cycles ago
    logic raw, e0, e1, ev;
    h[0] = 0; h[1] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      req_valid = $urandom % 4 != 0;
      req_mul = $urandom % 4 == 0;
      req_vs = 4'($urandom % 6); req_vt = 4'($urandom % 6); req_vd = 4'($urandom % 6);
      req_rd_vs = $urandom; req_rd_vt = $urandom; req_rd_vd = $urandom % 4 == 0;
      req_wr_vd = $urandom % 5 != 0;
      vlr = ($urandom % 20 == 0) ? 8'(33 + $urandom % 200) : 8'($urandom % 33);
      vp_busy = ($urandom % 3 == 0) ? 2'($urandom) : 2'b00;
      stall = $urandom % 10 == 0;
      #1;
      raw = 0;
      for (int k = 0; k < 2; k++) begin
        if (h[k][4] && req_rd_vs && req_vs != 0 && req_vs == h[k][3:0]) raw = 1;
        if (h[k][4] && req_rd_vt && req_vt != 0 && req_vt == h[k][3:0]) raw = 1;
        if (h[k][4] && req_rd_vd && req_vd != 0 && req_vd == h[k][3:0]) raw = 1;
      end
      ev = req_valid && vlr > 32;
      e0 = 0; e1 = 0;
      if (req_valid && !ev && !raw && !stall) begin
        if (req_mul) e0 = !vp_busy[0];
        else if (!vp_busy[1]) e1 = 1;
        else e0 = !vp_busy[0];
      end
      check(vue == ev, "vue");
      check(go_vp0 == e0 && go_vp1 == e1,
            $sformatf("go %b%b expected %b%b (mul %b busy %b raw %b stall %b)",
                      go_vp1, go_vp0, e1, e0, req_mul, vp_busy, raw, stall));
      check(interlock == (req_valid && !ev && !e0 && !e1), "interlock");
      n_go0 += e0; n_go1 += e1; n_vue += ev;
      n_raw += req_valid && !ev && raw && !stall;
      n_busy += req_valid && !ev && !raw && !stall && !e0 && !e1;
      if (!stall) begin
        h[1] = h[0];
        h[0] = {(e0 || e1) && req_wr_vd && vlr != 0, req_vd};
      end
    end
    check(n_go0 > 100 && n_go1 > 100 && n_raw > 100 && n_vue > 100 && n_busy > 100,
          "all outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
