// tb_workloads: runs the addition streams of two application kernels through
// the 32-bit fault-tolerant adder and measures the average adder cycles per
// addition.
//
// Livermore Loop 1 (990 iterations): each iteration has 19 additions. Six
// work on 16-bit values (loop compare by subtraction, increment of k, the
// four index computations k-1, k-1, k+9, k+10); thirteen are 32-bit (seven
// struct-member addresses, four base-plus-index addresses, two additions of
// array data). Expected cost: (6 + 2*13) / 19 = 1.684 cycles per addition.
//
// Dense single-precision matrix multiply of n x n matrices with software
// floating point, for n = 4 and n = 12. The stream follows the loop nest:
// loop compares and increments, row-major index computations (16-bit),
// base-plus-offset addresses (32-bit), characteristic additions (16-bit) and
// mantissa additions (32-bit) of the float multiply and add. Expected counts:
// 8n^3 + 4n^2 + 3n + 1 narrow and 7n^3 + n^2 wide additions.
//
// A 16-bit subtraction x - y is presented as x + (~y mod 2^16) with carry in
// 1, so both operands stay within 16 bits. Requests are issued back to back.
// Every result is checked against the integer sum and must raise no error;
// the number of narrow and wide additions and the elapsed cycles are checked
// against the counts above. A watchdog ends the run.
module tb_workloads;

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

  typedef struct {
    logic [32:0] res;
    logic        narrow;
  } exp_t;

  exp_t   exp_q[$];
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Per-workload statistics.
  longint n16, n32, t_first, t_last;
  bit     started;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e = exp_q.pop_front();
        if ({cout, sum} !== e.res || narrow !== e.narrow || error !== 1'b0) begin
          failures++;
          $display("FAIL got %b_%h n=%b e=%b exp %h n=%b", cout, sum, narrow, error, e.res, e.narrow);
        end
      end
    end
  end

  // Issue one addition; waits while the adder is busy.
  task automatic add(input logic [31:0] x, input logic [31:0] y, input logic c);
    exp_t e;
    in_valid = 1'b1;
    a        = x;
    b        = y;
    cin      = c;
    #1;
    while (!in_ready) begin
      @(posedge clk);
      #1;
    end
    e.res    = {1'b0, x} + {1'b0, y} + {32'd0, c};
    e.narrow = (x[31:16] == 0) && (y[31:16] == 0);
    exp_q.push_back(e);
    if (e.narrow) n16++;
    else n32++;
    if (!started) begin
      started = 1;
      t_first = cycle;
    end
    t_last = cycle + (e.narrow ? 1 : 2);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  // 16-bit subtraction x - y as an addition of 16-bit operands.
  task automatic sub16(input int unsigned x, input int unsigned y);
    add(32'(x & 16'hFFFF), 32'((~y) & 16'hFFFF), 1'b1);
  endtask

  task automatic begin_workload();
    n16     = 0;
    n32     = 0;
    started = 0;
  endtask

  // Wait for all results, then check the addition counts and cycle budget.
  task automatic end_workload(input string name, input longint exp16, input longint exp32);
    longint span;
    in_valid = 1'b0;
    while (exp_q.size() != 0) @(posedge clk);
    #1;
    span = t_last - t_first;
    checks++;
    if (n16 != exp16 || n32 != exp32) begin
      failures++;
      $display("FAIL %s: %0d narrow / %0d wide additions, expected %0d / %0d",
               name, n16, n32, exp16, exp32);
    end
    checks++;
    if (span != n16 + 2 * n32) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", name, span, n16 + 2 * n32);
    end
    $display("%s: %0d narrow + %0d wide additions in %0d cycles, %0d.%03d cycles per addition",
             name, n16, n32, span, span / (n16 + n32),
             (span * 1000 / (n16 + n32)) % 1000);
  endtask

  localparam logic [31:0] SPACE1_BASE = 32'h2000_0000;  // struct space1_1
  localparam logic [31:0] SPACES_BASE = 32'h2000_4000;  // struct spaces_1
  localparam logic [31:0] OFF_X = 32'h0000_0000;
  localparam logic [31:0] OFF_Y = 32'h0000_0FA0;
  localparam logic [31:0] OFF_Z = 32'h0000_1F40;
  localparam logic [31:0] OFF_Q = 32'h0000_0000;
  localparam logic [31:0] OFF_R = 32'h0000_0004;
  localparam logic [31:0] OFF_T = 32'h0000_0008;

  function automatic logic [31:0] rand_data();
    logic [31:0] v;
    v = $urandom();
    v[30] = 1'b1;  // data is taken as full 32-bit
    return v;
  endfunction

  task automatic livermore1();
    begin_workload();
    for (int unsigned k = 1; k <= 990; k++) begin
      sub16(k, 990);                         // loop compare
      add(32'(k), 32'(16'hFFFF), 1'b0);      // k - 1 (x index)
      add(32'(k), 32'(16'hFFFF), 1'b0);      // k - 1 (y index)
      add(32'(k), 32'd9, 1'b0);              // k + 9
      add(32'(k), 32'd10, 1'b0);             // k + 10
      // Struct member addresses.
      add(SPACE1_BASE, OFF_X, 1'b0);
      add(SPACES_BASE, OFF_Q, 1'b0);
      add(SPACE1_BASE, OFF_Y, 1'b0);
      add(SPACES_BASE, OFF_R, 1'b0);
      add(SPACE1_BASE, OFF_Z, 1'b0);
      add(SPACES_BASE, OFF_T, 1'b0);
      add(SPACE1_BASE, OFF_Z, 1'b0);
      // Base plus index.
      add(SPACE1_BASE + OFF_X, 32'((k - 1) * 4), 1'b0);
      add(SPACE1_BASE + OFF_Y, 32'((k - 1) * 4), 1'b0);
      add(SPACE1_BASE + OFF_Z, 32'((k + 9) * 4), 1'b0);
      add(SPACE1_BASE + OFF_Z, 32'((k + 10) * 4), 1'b0);
      // Expression: r*z + t*z, then q + y*(...).
      add(rand_data(), rand_data(), 1'b0);
      add(rand_data(), rand_data(), 1'b0);
      add(32'(k), 32'd1, 1'b0);              // ++k
    end
    end_workload("Livermore loop 1", 6 * 990, 13 * 990);
  endtask

  // Software float multiply of two normalized values with mantissas below
  // sqrt(2): two characteristic additions and three mantissa additions.
  task automatic fmul(input logic [31:0] x, input logic [31:0] y);
    logic [7:0]  cx, cy;
    logic [23:0] mx, my;
    logic [31:0] hh, hl, lh;
    cx = x[30:23];
    cy = y[30:23];
    mx = {1'b1, x[22:0]};
    my = {1'b1, y[22:0]};
    hh = 32'(mx[23:12]) * 32'(my[23:12]);
    hl = 32'(mx[23:12]) * 32'(my[11:0]);
    lh = 32'(mx[11:0]) * 32'(my[23:12]);
    add(32'(cx), 32'(cy), 1'b0);              // c1 + c2
    sub16(32'(cx) + 32'(cy), 127);            // - bias
    add(hh << 9, hl >> 3, 1'b0);              // mantissa partial sums
    add((hh << 9) + (hl >> 3), lh >> 3, 1'b0);
    add((hh << 9) + (hl >> 3) + (lh >> 3), 32'h0000_0100, 1'b0);
  endtask

  // Software float add: characteristic subtraction and mantissa addition.
  task automatic fadd(input logic [31:0] x, input logic [31:0] y);
    sub16(32'(x[30:23]), 32'(y[30:23]));
    add({8'd0, 1'b1, x[22:0]}, {8'd0, 1'b1, y[22:0]} >> 1, 1'b0);
  endtask

  function automatic logic [31:0] rand_float();
    logic [31:0] v;
    v = $urandom();
    v[30:23] = 8'(120 + $urandom_range(0, 10));
    v[22:20] = 3'b000;  // mantissa below sqrt(2)
    return v;
  endfunction

  task automatic matmul(input int unsigned n);
    logic [31:0] abase, bbase, cbase;
    abase = 32'h2001_0000;
    bbase = 32'h2002_0000;
    cbase = 32'h2003_0000;
    begin_workload();
    for (int unsigned i = 0; ; i++) begin
      sub16(i, n);                                   // i < n
      if (i == n) break;
      for (int unsigned j = 0; ; j++) begin
        sub16(j, n);                                 // j < n
        if (j == n) break;
        add(32'(i * n), 32'(j), 1'b0);               // c[i][j] = 0: index
        add(cbase, 32'((i * n + j) * 4), 1'b0);      //   address
        for (int unsigned k = 0; ; k++) begin
          sub16(k, n);                               // k < n
          if (k == n) break;
          add(32'(i * n), 32'(k), 1'b0);             // a[i][k]
          add(abase, 32'((i * n + k) * 4), 1'b0);
          add(32'(k * n), 32'(j), 1'b0);             // b[k][j]
          add(bbase, 32'((k * n + j) * 4), 1'b0);
          add(32'(i * n), 32'(j), 1'b0);             // c[i][j]
          add(cbase, 32'((i * n + j) * 4), 1'b0);
          fmul(rand_float(), rand_float());
          fadd(rand_float(), rand_float());
          add(32'(k), 32'd1, 1'b0);                  // k++
        end
        add(32'(j), 32'd1, 1'b0);                    // j++
      end
      add(32'(i), 32'd1, 1'b0);                      // i++
    end
    end_workload($sformatf("matrix multiply n=%0d", n),
                 8 * n * n * n + 4 * n * n + 3 * n + 1, 7 * n * n * n + n * n);
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a        = '0;
    b        = '0;
    cin      = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    livermore1();
    matmul(4);
    matmul(12);
    matmul(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
