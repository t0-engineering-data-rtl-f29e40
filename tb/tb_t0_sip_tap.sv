// tb_t0_sip_tap: compares the TAP controller against a reference transition
// table (next state for tms=0 and tms=1 of every state) over a long random tms
// sequence, and checks that five cycles of tms=1 reach Test-Logic-Reset from
// every state.
module tb_t0_sip_tap;
  import t0_pkg::*;
  logic clk = 1'b0, tms = 1'b1;
  tap_state_e state;
  int checks = 0, failures = 0;

  t0_sip_tap dut (.clk, .tms, .state);

  always #5 clk = ~clk;

  // reference: {next on tms=0, next on tms=1}
  function automatic tap_state_e ref_next(tap_state_e s, logic t);
    tap_state_e n0, n1;
    case (s)
      TAP_RESET:      begin n0 = TAP_IDLE;       n1 = TAP_RESET;     end
      TAP_IDLE:       begin n0 = TAP_IDLE;       n1 = TAP_SELECT_DR; end
      TAP_SELECT_DR:  begin n0 = TAP_CAPTURE_DR; n1 = TAP_SELECT_IR; end
      TAP_CAPTURE_DR: begin n0 = TAP_SHIFT_DR;   n1 = TAP_EXIT1_DR;  end
      TAP_SHIFT_DR:   begin n0 = TAP_SHIFT_DR;   n1 = TAP_EXIT1_DR;  end
      TAP_EXIT1_DR:   begin n0 = TAP_PAUSE_DR;   n1 = TAP_UPDATE_DR; end
      TAP_PAUSE_DR:   begin n0 = TAP_PAUSE_DR;   n1 = TAP_EXIT2_DR;  end
      TAP_EXIT2_DR:   begin n0 = TAP_SHIFT_DR;   n1 = TAP_UPDATE_DR; end
      TAP_UPDATE_DR:  begin n0 = TAP_IDLE;       n1 = TAP_SELECT_DR; end
      TAP_SELECT_IR:  begin n0 = TAP_CAPTURE_IR; n1 = TAP_RESET;     end
      TAP_CAPTURE_IR: begin n0 = TAP_SHIFT_IR;   n1 = TAP_EXIT1_IR;  end
      TAP_SHIFT_IR:   begin n0 = TAP_SHIFT_IR;   n1 = TAP_EXIT1_IR;  end
      TAP_EXIT1_IR:   begin n0 = TAP_PAUSE_IR;   n1 = TAP_UPDATE_IR; end
      TAP_PAUSE_IR:   begin n0 = TAP_PAUSE_IR;   n1 = TAP_EXIT2_IR;  end
      TAP_EXIT2_IR:   begin n0 = TAP_SHIFT_IR;   n1 = TAP_UPDATE_IR; end
      default:        begin n0 = TAP_IDLE;       n1 = TAP_SELECT_DR; end
    endcase
    return t ? n1 : n0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tap_state_e model;
    int visited [16];
    foreach (visited[i]) visited[i] = 0;
    // reset by holding tms high
    @(negedge clk); tms = 1'b1;
    repeat (5) @(posedge clk);
    #1 checks++;
    if (state != TAP_RESET) begin failures++; $display("not in reset after 5 tms=1"); end
    model = TAP_RESET;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      tms = ($urandom % 3) == 0;
      @(posedge clk); #1;
      model = ref_next(model, tms);
      visited[model]++;
      checks++;
      if (state != model) begin
        failures++;
        $display("step %0d: state %s expected %s", i, state.name(), model.name());
        model = state;
      end
    end
    foreach (visited[i]) begin
      checks++;
      if (visited[i] == 0) begin failures++; $display("state %0d never visited", i); end
    end
    // five tms=1 from each state reach Test-Logic-Reset
    for (int s = 0; s < 16; s++) begin
      // steer into a random state, then hold tms high
      @(negedge clk); tms = 1'b0;
      repeat ($urandom % 7) begin @(negedge clk); tms = $urandom % 2; end
      @(negedge clk); tms = 1'b1;
      repeat (5) @(posedge clk);
      #1 checks++;
      if (state != TAP_RESET) begin failures++; $display("5x tms=1 did not reset"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
