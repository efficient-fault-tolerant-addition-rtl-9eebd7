// tb_reso_ctrl: self-checking test of the sequencer.
//
// Random request streams (valid gaps, narrow and wide additions) drive the
// sequencer. A cycle-level reference model in the testbench tracks whether the
// previous accepted addition was wide and predicts in_ready, sel_held and the
// three capture strobes every cycle, and out_valid one cycle after a capture
// that completes an addition. It also checks the adder-cycle cost: a
// back-to-back burst of narrow requests is taken one per cycle, a burst of
// wide ones one per two cycles. A watchdog ends the run.
module tb_reso_ctrl;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic rst_n, in_valid, dual;
  logic in_ready, sel_held, ld_dual, ld_first, ld_second, out_valid;

  reso_ctrl dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .dual(dual),
    .in_ready(in_ready), .sel_held(sel_held), .ld_dual(ld_dual),
    .ld_first(ld_first), .ld_second(ld_second), .out_valid(out_valid)
  );

  // Reference model state.
  bit m_repeat;
  bit m_out;

  task automatic expect_eq(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b at %0t", what, got, exp, $time);
    end
  endtask

  // Drive one cycle: set inputs, check combinational outputs, clock, update model.
  task automatic step(input logic v, input logic d);
    bit acc;
    in_valid = v;
    dual     = d;
    #1;
    expect_eq("in_ready",  in_ready,  !m_repeat);
    expect_eq("sel_held",  sel_held,  m_repeat);
    acc = v && !m_repeat;
    expect_eq("ld_dual",   ld_dual,   acc && d);
    expect_eq("ld_first",  ld_first,  acc && !d);
    expect_eq("ld_second", ld_second, m_repeat);
    expect_eq("out_valid", out_valid, m_out);
    @(posedge clk);
    m_out    = (acc && d) || m_repeat;
    m_repeat = acc && !d;
    #1;
  endtask

  // Count the cycles a burst of `n` always-valid requests of one kind needs.
  task automatic burst(input int n, input logic d, output int cycles);
    int taken;
    taken  = 0;
    cycles = 0;
    while (taken < n) begin
      in_valid = 1'b1;
      dual     = d;
      #1;
      if (in_ready) taken++;
      step(1'b1, d);
      cycles++;
    end
    // Let a trailing repeat cycle finish.
    while (m_repeat) begin
      step(1'b0, 1'b0);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    dual     = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    rst_n    = 1'b1;
    m_repeat = 0;
    m_out    = 0;
    for (int i = 0; i < 3000; i++)
      step(1'($urandom_range(0, 3) != 0), 1'($urandom()));
    burst(20, 1'b1, cyc);
    checks++;
    if (cyc != 20) begin
      failures++;
      $display("FAIL narrow burst took %0d cycles, expected 20", cyc);
    end
    burst(20, 1'b0, cyc);
    checks++;
    if (cyc != 40) begin
      failures++;
      $display("FAIL wide burst took %0d cycles, expected 40", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
