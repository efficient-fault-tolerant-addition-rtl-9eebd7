// tb_result_compare: self-checking test of the result comparator at the
// adder's 33-bit {carry, sum} width: equal values, values differing in exactly
// one bit (every position), and random pairs. A watchdog ends the run.
module tb_result_compare;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [32:0] x, y;
  logic        mismatch;

  result_compare #(.W(33)) dut (.x(x), .y(y), .mismatch(mismatch));

  task automatic check(input logic [32:0] vx, input logic [32:0] vy);
    x = vx;
    y = vy;
    #1;
    checks++;
    if (mismatch !== (vx != vy)) begin
      failures++;
      $display("FAIL x=%h y=%h mismatch=%b", vx, vy, mismatch);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [32:0] r;
      r = {1'($urandom()), 32'($urandom())};
      check(r, r);
    end
    for (int p = 0; p < 33; p++) begin
      logic [32:0] r;
      r = {1'($urandom()), 32'($urandom())};
      check(r, r ^ (33'd1 << p));
    end
    for (int i = 0; i < 100; i++) begin
      logic [32:0] r;
      int          p;
      r = {1'($urandom()), 32'($urandom())};
      p = (i % 2 == 0) ? 32 : int'($urandom_range(0, 32));
      check(r, r ^ (33'd1 << p));
    end
    for (int i = 0; i < 500; i++)
      check({1'($urandom()), 32'($urandom())}, {1'($urandom()), 32'($urandom())});
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
