// tb_zero_detect: self-checking test of the zero test (OR tree).
//
// Checks the default 32-bit, fan-in-4 tree and an irregular 11-bit, fan-in-3
// tree against a direct comparison with zero: all-zero input, every single
// set bit, and random patterns with few bits set. A watchdog ends the run.
module tb_zero_detect;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [31:0] bits32;
  logic        zero32;
  logic [10:0] bits11;
  logic        zero11;

  zero_detect dut32 (.bits(bits32), .zero(zero32));
  zero_detect #(.W(11), .FANIN(3)) dut11 (.bits(bits11), .zero(zero11));

  task automatic check(input logic [31:0] v32, input logic [10:0] v11);
    bits32 = v32;
    bits11 = v11;
    #1;
    checks++;
    if (zero32 !== (v32 == 32'd0)) begin
      failures++;
      $display("FAIL W=32 bits=%h zero=%b", v32, zero32);
    end
    checks++;
    if (zero11 !== (v11 == 11'd0)) begin
      failures++;
      $display("FAIL W=11 bits=%h zero=%b", v11, zero11);
    end
  endtask

  initial begin
    check('0, '0);
    for (int i = 0; i < 32; i++) check(32'd1 << i, 11'(1 << (i % 11)));
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r;
      r = $urandom() & $urandom() & $urandom();
      if ($urandom_range(0, 3) == 0) r = '0;
      check(r, r[10:0]);
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
