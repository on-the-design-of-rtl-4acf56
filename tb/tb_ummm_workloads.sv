// tb_ummm_workloads: the multiplier at its default size (N = 16, a 31 x 31
// array, 256-bit chunks) on the two evaluation workloads of the design:
//   1. 1000 generic 16 x 16 products streamed back to back;
//   2. one band product of 1000 rows with 16 diagonals on each side of the
//      main one (upper width p = 16, lower height q = 16, band width 31 in A,
//      B and 61 in C).
// Memory and result streams run without gaps. Every result chunk is compared
// with a reference product computed here (the band reference sums only the
// k inside both bands). The bench also measures the run time of each
// workload. At this size the result writer is the bottleneck, one 256-bit
// chunk per cycle, so each workload must finish within its number of result
// chunks plus the pipeline latency and the mode switch drain. The workload
// sizes follow the evaluation; the band shape is this bench's choice.
module tb_ummm_workloads;
  import ummm_pkg::*;

  localparam int unsigned N      = 16;
  localparam int unsigned SIZE   = 2*N-1;
  localparam int unsigned CW     = 2*SIZE-1;
  localparam int unsigned DW     = 8;
  localparam int unsigned AW     = 32;
  localparam int unsigned CHW    = 256;
  localparam int unsigned G_OPS  = 1000;
  localparam int unsigned B_ROWS = 1000;
  localparam int unsigned SLACK  = 400;  // latency, drain and mode switch

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  opmode_e        opmode, cur_mode;
  logic [15:0]    mat_n;
  logic           a_valid, a_ready, b_valid, b_ready, c_valid, c_ready, c_last, cnt_clear;
  logic [CHW-1:0] a_data, b_data, c_data;
  logic [31:0]    cnt_cycles, cnt_stalls, cnt_lines;

  ummm_system dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  typedef struct { logic [CHW-1:0] d; logic last; } chunk_t;
  chunk_t exp_q [$];
  logic [CHW-1:0] a_q [$];
  logic [CHW-1:0] b_q [$];

  function automatic void cut(ref bit bits [$], ref logic [CHW-1:0] q [$], input bit to_exp);
    while (bits.size() != 0) begin
      logic [CHW-1:0] c;
      chunk_t ct;
      int n;
      c = '0;
      n = (bits.size() < CHW) ? bits.size() : CHW;
      for (int b = 0; b < n; b++) c[b] = bits.pop_front();
      if (to_exp) begin
        ct.d = c;
        ct.last = (bits.size() == 0);
        exp_q.push_back(ct);
      end else q.push_back(c);
    end
  endfunction

  function automatic void put(ref bit bits [$], input longint unsigned v, input int w);
    for (int b = 0; b < w; b++) bits.push_back(v[b]);
  endfunction

  int unsigned A [B_ROWS][B_ROWS];
  int unsigned B [B_ROWS][B_ROWS];

  // One generic 16 x 16 product; B goes to memory transposed.
  function automatic void make_gmmm();
    bit ab [$], bb [$], cb [$];
    logic [CHW-1:0] dummy [$];
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        A[i][k] = $urandom_range(0, 255);
        B[i][k] = $urandom_range(0, 255);
      end
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < N; k++) begin
        put(ab, A[i][k], DW);
        put(bb, B[k][i], DW);
      end
      for (int j = 0; j < N; j++) begin
        int unsigned s;
        s = 0;
        for (int k = 0; k < N; k++) s += A[i][k] * B[k][j];
        put(cb, s, AW);
      end
    end
    cut(ab, a_q, 0);
    cut(bb, b_q, 0);
    cut(cb, dummy, 1);
  endfunction

  // One band product of n rows; A has p diagonals on and above the main one
  // and q below it, B the other way round.
  function automatic void make_bmmm(int n, int p, int q);
    bit ab [$], bb [$], cb [$];
    logic [CHW-1:0] dummy [$];
    for (int i = 0; i < n; i++)
      for (int k = 0; k < n; k++) begin
        A[i][k] = ((k - i) < p && (i - k) < q) ? $urandom_range(0, 255) : 0;
        B[i][k] = ((k - i) < q && (i - k) < p) ? $urandom_range(0, 255) : 0;
      end
    for (int i = 0; i < n; i++) begin
      for (int e = 0; e < SIZE; e++) begin
        int c;
        c = i + e - (N-1);
        put(ab, (c >= 0 && c < n) ? A[i][c] : 0, DW);
        put(bb, (c >= 0 && c < n) ? B[i][c] : 0, DW);
      end
      for (int e = 0; e < CW; e++) begin
        int j;
        int unsigned s;
        j = i + e - (SIZE-1);
        s = 0;
        if (j >= 0 && j < n)
          for (int k = i - q + 1; k < i + p; k++)
            if (k >= 0 && k < n) s += A[i][k] * B[k][j];
        put(cb, s, AW);
      end
    end
    cut(ab, a_q, 0);
    cut(bb, b_q, 0);
    cut(cb, dummy, 1);
  endfunction

  task automatic feed(input bit is_a, input int nchunks);
    for (int c = 0; c < nchunks; c++) begin
      @(negedge clk);
      if (is_a) begin a_data = a_q.pop_front(); a_valid = 1; end
      else      begin b_data = b_q.pop_front(); b_valid = 1; end
      forever begin
        bit t;
        #1 t = is_a ? a_ready : b_ready;
        @(posedge clk);
        if (t) break;
        @(negedge clk);
      end
      #1;
      if (is_a) a_valid = 0; else b_valid = 0;
    end
  endtask

  assign c_ready = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (c_valid && c_ready) begin
      chunk_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected chunk");
      end else begin
        e = exp_q.pop_front();
        if (c_data !== e.d || c_last !== e.last) begin
          failures++;
          if (failures < 10)
            $display("FAIL: chunk %h last %0d expected %h last %0d", c_data, c_last, e.d, e.last);
        end
      end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d chunks outstanding", exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int na, nb, nc;
    longint t0, dt;
    void'($urandom(7));
    opmode = OP_GMMM; mat_n = 16'd1; cnt_clear = 0;
    a_valid = 0; b_valid = 0; a_data = '0; b_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- workload 1: streamed generic products
    for (int t = 0; t < G_OPS; t++) make_gmmm();
    na = a_q.size(); nb = b_q.size(); nc = exp_q.size();
    @(negedge clk);
    opmode = OP_GMMM;
    t0 = cycle;
    fork
      feed(1, na);
      feed(0, nb);
    join
    while (exp_q.size() != 0) @(posedge clk);
    dt = cycle - t0;
    $display("generic: %0d products, %0d result chunks, %0d cycles (%0.2f cycles per product)",
             G_OPS, nc, dt, real'(dt) / G_OPS);
    check(dt <= longint'(nc) + longint'(SLACK), "generic workload runs at the result writer's rate");

    // ---- workload 2: one large band product
    make_bmmm(B_ROWS, N, N);
    na = a_q.size(); nb = b_q.size(); nc = exp_q.size();
    @(negedge clk);
    opmode = OP_BMMM;
    mat_n  = 16'(B_ROWS);
    t0 = cycle;
    fork
      feed(1, na);
      feed(0, nb);
    join
    while (exp_q.size() != 0) @(posedge clk);
    dt = cycle - t0;
    $display("band: %0d rows, %0d result chunks, %0d cycles", B_ROWS, nc, dt);
    check(dt <= longint'(nc) + longint'(SLACK), "band workload runs at the result writer's rate");
    check(dt >= 3 * B_ROWS, "band workload takes at least three cycles per row");

    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all result chunks seen");
    $display("stall counter: %0d stalled of %0d busy cycles, %0d lines", cnt_stalls, cnt_cycles, cnt_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
