// tb_reso_datapath: self-checking test of the redundant-addition datapath.
//
// The 32-bit datapath is driven with narrow operands (upper 16 bits of both
// zero) and wide operands, including operands where only one of the two has
// upper bits set and corner cases around the 16-bit boundary. Expected values
// come from integer arithmetic in the testbench:
//   * dual must be high exactly when both upper halves are zero;
//   * in dual mode both {c_lo, s_lo} and {c_hi, s_hi} must equal a + b + cin;
//   * otherwise {c_hi, s_hi, s_lo} must equal the 33-bit a + b + cin.
// An 8-bit datapath is also checked exhaustively. A watchdog ends the run.
module tb_reso_datapath;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [31:0] a, b;
  logic        cin, dual, c_lo, c_hi;
  logic [15:0] s_lo, s_hi;

  logic [7:0]  a8, b8;
  logic        cin8, dual8, c_lo8, c_hi8;
  logic [3:0]  s_lo8, s_hi8;

  reso_datapath dut (
    .a(a), .b(b), .cin(cin), .dual(dual),
    .s_lo(s_lo), .c_lo(c_lo), .s_hi(s_hi), .c_hi(c_hi)
  );

  reso_datapath #(.N(8)) dut8 (
    .a(a8), .b(b8), .cin(cin8), .dual(dual8),
    .s_lo(s_lo8), .c_lo(c_lo8), .s_hi(s_hi8), .c_hi(c_hi8)
  );

  int n_dual = 0;
  int n_wide = 0;

  task automatic check(input logic [31:0] va, input logic [31:0] vb, input logic vc);
    logic [32:0] ref_sum;
    logic        ref_dual;
    a   = va;
    b   = vb;
    cin = vc;
    #1;
    ref_sum  = {1'b0, va} + {1'b0, vb} + {32'd0, vc};
    ref_dual = (va[31:16] == 16'd0) && (vb[31:16] == 16'd0);
    checks++;
    if (dual !== ref_dual) begin
      failures++;
      $display("FAIL dual a=%h b=%h dual=%b", va, vb, dual);
    end
    if (ref_dual) begin
      n_dual++;
      checks += 2;
      if ({c_lo, s_lo} !== ref_sum[16:0]) begin
        failures++;
        $display("FAIL low copy a=%h b=%h c=%b got %b_%h", va, vb, vc, c_lo, s_lo);
      end
      if ({c_hi, s_hi} !== ref_sum[16:0]) begin
        failures++;
        $display("FAIL high copy a=%h b=%h c=%b got %b_%h", va, vb, vc, c_hi, s_hi);
      end
    end else begin
      n_wide++;
      checks++;
      if ({c_hi, s_hi, s_lo} !== ref_sum) begin
        failures++;
        $display("FAIL wide a=%h b=%h c=%b got %b_%h_%h", va, vb, vc, c_hi, s_hi, s_lo);
      end
    end
  endtask

  initial begin
    check(32'h0000_FFFF, 32'h0000_FFFF, 1'b1);
    check(32'h0000_FFFF, 32'h0000_0000, 1'b1);
    check(32'h0000_8000, 32'h0000_8000, 1'b0);
    check(32'h0001_0000, 32'h0000_0001, 1'b0);
    check(32'h0000_0001, 32'h8000_0000, 1'b1);
    check(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ra, rb;
      ra = $urandom();
      rb = $urandom();
      case ($urandom_range(0, 3))
        0: begin ra[31:16] = '0; rb[31:16] = '0; end
        1: ra[31:16] = '0;
        2: rb[31:16] = 16'(1 << $urandom_range(0, 15)) & {16{1'b1}};
        default: ;
      endcase
      if ($urandom_range(0, 2) == 0) rb[31:16] = ra[31:16] == 0 ? 16'd0 : rb[31:16];
      check(ra, rb, 1'($urandom()));
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          logic [8:0] r8;
          a8   = 8'(x);
          b8   = 8'(y);
          cin8 = 1'(c);
          #1;
          r8 = 9'(x + y + c);
          checks++;
          if (dual8 !== (x < 16 && y < 16)) begin
            failures++;
            $display("FAIL8 dual %0d %0d", x, y);
          end else if (dual8) begin
            checks++;
            if ({c_lo8, s_lo8} !== r8[4:0] || {c_hi8, s_hi8} !== r8[4:0]) begin
              failures++;
              $display("FAIL8 dual sum %0d %0d %0d", x, y, c);
            end
          end else begin
            checks++;
            if ({c_hi8, s_hi8, s_lo8} !== r8) begin
              failures++;
              $display("FAIL8 wide sum %0d %0d %0d", x, y, c);
            end
          end
        end
    checks++;
    if (n_dual < 100 || n_wide < 100) begin
      failures++;
      $display("FAIL coverage dual=%0d wide=%0d", n_dual, n_wide);
    end
    $display("dual-mode additions=%0d wide additions=%0d", n_dual, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
