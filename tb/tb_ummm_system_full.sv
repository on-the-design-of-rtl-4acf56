// tb_ummm_system_full: the multiplier at its default size (N = 16, a 31 x 31
// array, 256-bit chunks), taken through complete operations end to end: a
// generic 16 x 16 product, a band product of 40 rows, and a generic product
// again (two mode switches). Every result chunk is compared with a reference
// product computed here. Memory and result streams run without gaps.
module tb_ummm_system_full;
  import ummm_pkg::*;

  localparam int unsigned N     = 16;
  localparam int unsigned NOPS  = 3;
  localparam int unsigned SEED  = 1;
  localparam int unsigned SIZE  = 2*N-1;
  localparam int unsigned CW    = 2*SIZE-1;
  localparam int unsigned DW    = 8;
  localparam int unsigned AW    = 32;
  localparam int unsigned CHW   = 256;
  localparam int unsigned MAXN  = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  opmode_e        opmode, cur_mode;
  logic [15:0]    mat_n;
  logic           a_valid, a_ready, b_valid, b_ready, c_valid, c_ready, c_last, cnt_clear;
  logic [CHW-1:0] a_data, b_data, c_data;
  logic [31:0]    cnt_cycles, cnt_stalls, cnt_lines;

  ummm_system dut (.*);

  int checks = 0, failures = 0;

  typedef struct { logic [CHW-1:0] d; logic last; } chunk_t;
  chunk_t exp_q [$];
  logic [CHW-1:0] a_q [$];
  logic [CHW-1:0] b_q [$];

  int n_starve = 0, n_backp = 0, n_switch = 0, n_bubble = 0, n_straddle = 0, n_pad = 0;

  // Cut a bit stream into chunks, zero padding the last one.
  function automatic void cut(ref bit bits [$], ref logic [CHW-1:0] q [$], input bit to_exp);
    while (bits.size() != 0) begin
      logic [CHW-1:0] c = '0;
      chunk_t ct;
      int n = (bits.size() < CHW) ? bits.size() : CHW;
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

  int unsigned A [MAXN][MAXN];
  int unsigned B [MAXN][MAXN];

  // One operation: fills the A and B chunk queues and the expected C chunks.
  function automatic void make_op(bit band, int n, int p, int q);
    bit ab [$], bb [$], cb [$];
    logic [CHW-1:0] dummy [$];
    if (!band) n = N;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < n; k++) begin
        A[i][k] = (!band || ((k - i) < p && (i - k) < q)) ? $urandom_range(0, 255) : 0;
        B[i][k] = (!band || ((k - i) < q && (i - k) < p)) ? $urandom_range(0, 255) : 0;
      end
    for (int i = 0; i < n; i++) begin
      if (!band) begin
        for (int k = 0; k < N; k++) begin
          put(ab, A[i][k], DW);
          put(bb, B[k][i], DW);
        end
        for (int j = 0; j < N; j++) begin
          int unsigned s = 0;
          for (int k = 0; k < N; k++) s += A[i][k] * B[k][j];
          put(cb, s, AW);
        end
      end else begin
        for (int e = 0; e < SIZE; e++) begin
          int c = i + e - (N-1);
          put(ab, (c >= 0 && c < n) ? A[i][c] : 0, DW);
          put(bb, (c >= 0 && c < n) ? B[i][c] : 0, DW);
        end
        for (int e = 0; e < CW; e++) begin
          int j = i + e - (SIZE-1);
          int unsigned s = 0;
          if (j >= 0 && j < n) for (int k = 0; k < n; k++) s += A[i][k] * B[k][j];
          put(cb, s, AW);
        end
      end
    end
    if ((cb.size() % CHW) != 0) n_pad++;
    cut(ab, a_q, 0);
    cut(bb, b_q, 0);
    cut(cb, dummy, 1);
  endfunction

  // ------------------------------------------------------------ streams
  bit stress = 0;
  bit band;
  int n, p, q, na, nb;

  task automatic feed(input bit is_a, input int nchunks);
    for (int c = 0; c < nchunks; c++) begin
      @(negedge clk);
      if (stress) while ($urandom_range(0, 2) == 0) @(negedge clk);
      // now and then a long memory latency, so the kernel runs dry mid-operation
      if (stress && c != 0 && $urandom_range(0, 3) == 0) repeat ($urandom_range(5, 40)) @(negedge clk);
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

  always @(posedge clk) c_ready <= stress ? ($urandom_range(0, 3) != 0) : 1'b1;

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
          $display("FAIL: chunk %h last %0d expected %h last %0d", c_data, c_last, e.d, e.last);
        end
      end
    end
    if (dut.u_kernel.starve)                          n_starve++;
    if (dut.u_kernel.out_valid && !dut.u_kernel.out_ready) n_backp++;
    if (dut.u_kernel.adv && !dut.u_kernel.fire && dut.u_kernel.at_boundary) n_bubble++;
    if (cur_mode != $past(cur_mode))                  n_switch++;
    if (dut.u_rd_a.out_fire && (32'(dut.u_rd_a.cnt_q) - dut.u_rd_a.vbits_q) % CHW > 0 &&
        (32'(dut.u_rd_a.cnt_q) - dut.u_rd_a.vbits_q) % CHW < dut.u_rd_a.vbits_q) n_straddle++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d chunks outstanding", exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(SEED));
    opmode = OP_GMMM; mat_n = 16'd1; cnt_clear = 0;
    a_valid = 0; b_valid = 0; a_data = '0; b_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    stress = 0;
    for (int t = 0; t < NOPS; t++) begin
      band = (t == 1);
      n    = MAXN;
      p    = N;
      q    = N;
      make_op(band, n, p, q);
      na = a_q.size(); nb = b_q.size();
      @(negedge clk);
      opmode = band ? OP_BMMM : OP_GMMM;
      mat_n  = 16'(n);
      fork
        feed(1, na);
        feed(0, nb);
      join
      while (exp_q.size() != 0) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all result chunks seen");
    check(n_switch == 2, "two mode switches");
    $display("stall counter: %0d stalled of %0d busy cycles, %0d lines", cnt_stalls, cnt_cycles, cnt_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
