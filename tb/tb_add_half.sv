// tb_add_half: self-checking test of the half-width adder.
//
// A 4-bit instance is checked exhaustively (all operands and carries) and a
// 16-bit instance with random and corner operands, both against the integer
// sum computed in the testbench. A watchdog ends the run.
module tb_add_half;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;

  add_half #(.W(4))  dut4  (.a(a4),  .b(b4),  .cin(ci4),  .s(s4),  .cout(co4));
  add_half #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .s(s16), .cout(co16));

  task automatic check16(input int unsigned x, input int unsigned y, input bit c);
    int unsigned ref_sum;
    a16  = 16'(x);
    b16  = 16'(y);
    ci16 = c;
    #1;
    ref_sum = (x & 32'hFFFF) + (y & 32'hFFFF) + 32'(c);
    checks++;
    if ({co16, s16} !== 17'(ref_sum)) begin
      failures++;
      $display("FAIL16 %h+%h+%b got %b_%h", a16, b16, c, co16, s16);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a4  = 4'(x);
          b4  = 4'(y);
          ci4 = 1'(c);
          #1;
          checks++;
          if ({co4, s4} !== 5'(x + y + c)) begin
            failures++;
            $display("FAIL4 %0d+%0d+%0d got %b_%h", x, y, c, co4, s4);
          end
        end
    check16(32'hFFFF, 32'h0000, 1'b1);
    check16(32'hFFFF, 32'hFFFF, 1'b1);
    check16(32'h8000, 32'h8000, 1'b0);
    for (int i = 0; i < 2000; i++) check16($urandom(), $urandom(), 1'($urandom()));
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
