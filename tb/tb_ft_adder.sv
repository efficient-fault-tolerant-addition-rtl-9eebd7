// tb_ft_adder: end-to-end test of the fault-tolerant adder at its default
// 32-bit width.
//
// A requester drives random additions through the valid/ready handshake,
// holding each one until it is accepted, with random idle gaps and
// back-to-back bursts. Narrow (both upper halves zero) and wide additions are
// mixed. A scoreboard predicts for every addition the sum, carry out, the
// narrow flag, the error flag and the latency (1 cycle for narrow, 2 for
// wide, counted from acceptance to out_valid).
//
// Three phases:
//   1. fault-free: error must never be raised;
//   2. a stuck-at-1 fault on bit 3 of the upper half-adder's sum: every
//      narrow addition whose true bit 3 is 0 must be flagged; wide additions
//      are hit in both computations the same way, so their result bit 19 is
//      wrong and no error is raised (a limit of plain repetition);
//   3. a stuck-at-0 fault on bit 2 of the upper half-adder's first operand:
//      a narrow addition is flagged when a[2] is 1; a wide one when a[18]
//      and b[18] differ, which only operand swapping can reveal.
// Faults are injected with force on the datapath's internal nets. The run
// counts each mechanism (narrow one-cycle additions, wide repeated additions,
// stalls of the requester, back-to-back narrow acceptances, detected errors in
// narrow and in wide mode) and fails if one never happened. A watchdog ends
// the run.
module tb_ft_adder;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        rst_n, in_valid, in_ready, cin, out_valid, cout, narrow, error;
  logic [31:0] a, b, sum;

  ft_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .cin(cin), .out_valid(out_valid), .sum(sum), .cout(cout),
    .narrow(narrow), .error(error)
  );

  typedef enum int { F_NONE, F_SUM_HI3_SA1, F_OPA_HI2_SA0 } fault_e;
  fault_e fault;

  typedef struct {
    logic [31:0] sum;
    logic        cout;
    logic        narrow;
    logic        error;
    longint      due;
  } exp_t;

  exp_t   exp_q[$];
  longint cycle = 0;

  int n_narrow = 0, n_wide = 0, n_stall = 0, n_b2b = 0;
  int n_err_narrow = 0, n_err_wide = 0, n_done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Expected outcome of one addition under the active fault.
  function automatic exp_t predict(logic [31:0] x, logic [31:0] y, logic c);
    exp_t        e;
    logic [32:0] r1, r2;
    logic [16:0] n1, n2;
    e.narrow = (x[31:16] == 0) && (y[31:16] == 0);
    if (e.narrow) begin
      n1 = {1'b0, x[15:0]} + {1'b0, y[15:0]} + {16'd0, c};
      n2 = n1;
      if (fault == F_SUM_HI3_SA1) n2[3] = 1'b1;
      if (fault == F_OPA_HI2_SA0)
        n2 = {1'b0, x[15:0] & ~16'h0004} + {1'b0, y[15:0]} + {16'd0, c};
      e.sum   = 32'(n1);
      e.cout  = 1'b0;
      e.error = (n1 != n2);
    end else begin
      r1 = {1'b0, x} + {1'b0, y} + {32'd0, c};
      r2 = r1;
      if (fault == F_SUM_HI3_SA1) begin
        r1[19] = 1'b1;
        r2[19] = 1'b1;
      end
      if (fault == F_OPA_HI2_SA0) begin
        // First pass adds x on the faulty input, the repeat adds y there.
        r1 = {1'b0, x & ~32'h0004_0000} + {1'b0, y} + {32'd0, c};
        r2 = {1'b0, y & ~32'h0004_0000} + {1'b0, x} + {32'd0, c};
      end
      e.sum   = r1[31:0];
      e.cout  = r1[32];
      e.error = (r1 != r2);
    end
    return e;
  endfunction

  // Result monitor and scoreboard.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        n_done++;
        if (sum !== e.sum || cout !== e.cout || narrow !== e.narrow || error !== e.error) begin
          failures++;
          $display("FAIL cycle %0d: got sum=%h c=%b n=%b e=%b exp sum=%h c=%b n=%b e=%b",
                   cycle, sum, cout, narrow, error, e.sum, e.cout, e.narrow, e.error);
        end
        checks++;
        if (cycle != e.due) begin
          failures++;
          $display("FAIL latency: result at cycle %0d, expected %0d", cycle, e.due);
        end
        if (error && narrow) n_err_narrow++;
        if (error && !narrow) n_err_wide++;
      end
    end else if (rst_n && error) begin
      checks++;
      failures++;
      $display("FAIL error raised without out_valid at cycle %0d", cycle);
    end
  end

  logic last_acc_narrow;

  // Present one addition and hold it until it is accepted.
  task automatic issue(input logic [31:0] x, input logic [31:0] y, input logic c);
    exp_t e;
    in_valid = 1'b1;
    a        = x;
    b        = y;
    cin      = c;
    forever begin
      #1;
      if (in_ready) break;
      n_stall++;
      @(posedge clk);
    end
    e = predict(x, y, c);
    e.due = cycle + (e.narrow ? 1 : 2);
    exp_q.push_back(e);
    if (e.narrow) n_narrow++;
    else n_wide++;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    in_valid = 1'b0;
    a        = $urandom();
    b        = $urandom();
    repeat (n) @(posedge clk);
    #1;
  endtask

  function automatic logic [31:0] rand_operand(input bit narrow_op);
    logic [31:0] v;
    v = $urandom();
    if (narrow_op) v[31:16] = '0;
    else if ($urandom_range(0, 1) == 0) v[31:16] = 16'(1 << $urandom_range(0, 15));
    return v;
  endfunction

  task automatic run_phase(input int n);
    for (int i = 0; i < n; i++) begin
      bit nx, ny;
      nx = ($urandom_range(0, 2) != 0);
      ny = nx ? ($urandom_range(0, 5) != 0) : 1'($urandom());
      issue(rand_operand(nx), rand_operand(ny), 1'($urandom()));
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 3));
    end
    idle(4);
  endtask

  // Monitor back-to-back narrow acceptances (full throughput).
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready && dut.u_dp.dual && last_acc_narrow) n_b2b++;
      last_acc_narrow <= in_valid && in_ready && dut.u_dp.dual;
    end else begin
      last_acc_narrow <= 1'b0;
    end
  end

  initial begin
    int err_before;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a        = '0;
    b        = '0;
    cin      = 1'b0;
    fault    = F_NONE;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;

    // Phase 1: fault-free.
    run_phase(3000);
    checks++;
    if (n_err_narrow + n_err_wide != 0) begin
      failures++;
      $display("FAIL errors raised without a fault");
    end

    // Phase 2: upper half-adder sum bit 3 stuck at 1.
    fault = F_SUM_HI3_SA1;
    force dut.u_dp.s_hi[3] = 1'b1;
    run_phase(1000);
    release dut.u_dp.s_hi[3];
    err_before = n_err_wide;

    // Phase 3: upper half-adder first operand bit 2 stuck at 0.
    fault = F_OPA_HI2_SA0;
    force dut.u_dp.hi_a[2] = 1'b0;
    run_phase(1000);
    release dut.u_dp.hi_a[2];
    fault = F_NONE;
    idle(4);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d additions produced no result", exp_q.size());
    end
    checks++;
    if (n_err_wide == err_before) begin
      failures++;
      $display("FAIL swapped repetition never caught a fault");
    end
    $display("mechanisms: narrow=%0d wide(repeated, swapped)=%0d stalls=%0d back-to-back narrow=%0d",
             n_narrow, n_wide, n_stall, n_b2b);
    $display("detected errors: narrow=%0d wide=%0d, results=%0d", n_err_narrow, n_err_wide, n_done);
    checks++;
    if (n_narrow == 0 || n_wide == 0 || n_stall == 0 || n_b2b == 0 ||
        n_err_narrow == 0 || n_err_wide == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
