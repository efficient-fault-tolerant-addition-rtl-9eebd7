// tb_mux2: self-checking test of the two-to-one multiplexer at the two widths
// the adder uses (16 bits for operands, 1 bit for the carry), with random
// data and both select values. A watchdog ends the run.
module tb_mux2;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        sel;
  logic [15:0] d0, d1, y;
  logic        c0, c1, cy;

  mux2 #(.W(16)) dut16 (.sel(sel), .d0(d0), .d1(d1), .y(y));
  mux2 #(.W(1))  dut1  (.sel(sel), .d0(c0), .d1(c1), .y(cy));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      sel = 1'($urandom());
      d0  = 16'($urandom());
      d1  = 16'($urandom());
      c0  = 1'($urandom());
      c1  = 1'($urandom());
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
      checks++;
      if (cy !== (sel ? c1 : c0)) begin
        failures++;
        $display("FAIL 1-bit sel=%b c0=%b c1=%b y=%b", sel, c0, c1, cy);
      end
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
