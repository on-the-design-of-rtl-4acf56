// tb_ummm_kernel: self-checking test of the unified kernel.
//
// Runs generic and band multiplications at a small size and compares every
// result row with a plain triple-loop product computed here. First one generic
// and one band operation run at full rate to check the latency (2N+1 and 6N-3
// cycles) and the input rate (one line per cycle, one band row per three
// cycles). Then a random mix of both operations runs with random gaps in the
// input and random back-pressure on the output, so that starvation stalls,
// output stalls, bubbles and mode switches all happen; each is counted and
// must occur. The stall counter is checked against the stalls seen here.
module tb_ummm_kernel;
  import ummm_pkg::*;

  localparam int unsigned N    = 4;
  localparam int unsigned SIZE = 2*N-1;
  localparam int unsigned CW   = 2*SIZE-1;
  localparam int unsigned DW   = 8;
  localparam int unsigned AW   = 32;
  localparam int unsigned MAXN = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  opmode_e          opmode;
  logic [15:0]      mat_n;
  opmode_e          cur_mode;
  logic             in_valid, in_ready, out_valid, out_ready, out_last, cnt_clear;
  logic [DW-1:0]    a_line [SIZE];
  logic [DW-1:0]    b_line [SIZE];
  logic [$clog2(CW+1)-1:0] out_len;
  logic [AW-1:0]    c_line [CW];
  logic [31:0]      cnt_cycles, cnt_stalls, cnt_lines;

  ummm_kernel #(.MAT_SIZE(N), .DATA_WIDTH(DW), .ACC_WIDTH(AW)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected output rows
  typedef struct { logic [AW-1:0] v [CW]; int len; logic last; } row_t;
  row_t exp_q [$];
  longint fire_cyc [$];      // cycle of each accepted input line (latency check)
  longint out_cyc  [$];

  bit measure = 0;
  int n_starve = 0, n_backp = 0, n_switch = 0, n_bubble = 0, n_gmmm = 0, n_bmmm = 0;
  int tb_stalls = 0;
  bit stress = 0;
  int sel;

  // ------------------------------------------------------------ reference
  int unsigned A [MAXN][MAXN];
  int unsigned B [MAXN][MAXN];

  function automatic void make_gmmm(ref logic [DW-1:0] al [N][N], ref logic [DW-1:0] bl [N][N]);
    row_t r;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        A[i][k] = $urandom_range(0, 255);
        B[i][k] = $urandom_range(0, 255);
      end
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < N; k++) begin
        al[i][k] = DW'(A[i][k]);
        bl[i][k] = DW'(B[k][i]);      // column i of B
      end
      for (int e = 0; e < CW; e++) r.v[e] = '0;
      for (int j = 0; j < N; j++) begin
        int unsigned s = 0;
        for (int k = 0; k < N; k++) s += A[i][k] * B[k][j];
        r.v[j] = s;
      end
      r.len  = N;
      r.last = (i == N-1);
      exp_q.push_back(r);
    end
  endfunction

  // Band matrices: A has p diagonals on and above the main one, q below;
  // B has q on and above, p below (p, q <= N).
  function automatic void make_bmmm(int n, int p, int q,
                                    ref logic [DW-1:0] al [MAXN][SIZE],
                                    ref logic [DW-1:0] bl [MAXN][SIZE]);
    row_t r;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < n; k++) begin
        A[i][k] = ((k - i) < p && (i - k) < q) ? $urandom_range(0, 255) : 0;
        B[i][k] = ((k - i) < q && (i - k) < p) ? $urandom_range(0, 255) : 0;
      end
    for (int i = 0; i < n; i++) begin
      for (int e = 0; e < SIZE; e++) begin
        int c = i + e - (N-1);
        al[i][e] = (c >= 0 && c < n) ? DW'(A[i][c]) : '0;
        bl[i][e] = (c >= 0 && c < n) ? DW'(B[i][c]) : '0;
      end
      for (int e = 0; e < CW; e++) begin
        int j = i + e - (SIZE-1);
        int unsigned s = 0;
        if (j >= 0 && j < n)
          for (int k = 0; k < n; k++) s += A[i][k] * B[k][j];
        r.v[e] = s;
      end
      r.len  = CW;
      r.last = (i == n-1);
      exp_q.push_back(r);
    end
  endfunction

  // ------------------------------------------------------------ driver
  // Inputs change on the falling edge; the handshake is decided by in_ready
  // just before the rising edge.
  task automatic send_line(input logic [DW-1:0] al [SIZE], input logic [DW-1:0] bl [SIZE]);
    bit taken = 0;
    @(negedge clk);
    if (stress) begin
      int gap = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 4) : 0;
      in_valid = 1'b0;
      repeat (gap) @(negedge clk);
    end
    a_line   = al;
    b_line   = bl;
    in_valid = 1'b1;
    while (!taken) begin
      #1 taken = in_ready;
      if (taken) fire_cyc.push_back(cyc);
      @(posedge clk);
      if (!taken) @(negedge clk);
    end
    #1 in_valid = 1'b0;
  endtask

  task automatic run_gmmm();
    logic [DW-1:0] al [N][N];
    logic [DW-1:0] bl [N][N];
    logic [DW-1:0] la [SIZE];
    logic [DW-1:0] lb [SIZE];
    make_gmmm(al, bl);
    @(negedge clk);
    opmode = OP_GMMM;
    n_gmmm++;
    for (int i = 0; i < N; i++) begin
      for (int e = 0; e < SIZE; e++) begin
        la[e] = (e < N) ? al[i][e] : DW'($urandom);   // unused lanes carry junk
        lb[e] = (e < N) ? bl[i][e] : DW'($urandom);
      end
      send_line(la, lb);
    end
  endtask

  task automatic run_bmmm(int n, int p, int q);
    logic [DW-1:0] al [MAXN][SIZE];
    logic [DW-1:0] bl [MAXN][SIZE];
    make_bmmm(n, p, q, al, bl);
    @(negedge clk);
    opmode = OP_BMMM;
    mat_n  = 16'(n);
    n_bmmm++;
    for (int i = 0; i < n; i++) send_line(al[i], bl[i]);
  endtask

  // ------------------------------------------------------------ monitor
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      row_t r;
      out_cyc.push_back(cyc);
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output row");
      end else begin
        r = exp_q.pop_front();
        if (int'(out_len) != r.len || out_last != r.last) begin
          failures++;
          $display("FAIL: len/last %0d/%0d expected %0d/%0d", out_len, out_last, r.len, r.last);
        end
        for (int e = 0; e < r.len; e++)
          if (c_line[e] !== r.v[e]) begin
            failures++;
            $display("FAIL: mode %0d element %0d = %0d expected %0d", cur_mode, e, c_line[e], r.v[e]);
          end
      end
    end
    if (dut.starve)                  n_starve++;
    if (dut.starve || (out_valid && !out_ready)) tb_stalls++;
    if (out_valid && !out_ready)     n_backp++;
    if (dut.adv && !dut.fire && dut.slot_ok && dut.at_boundary) n_bubble++;
    if (cur_mode != $past(cur_mode)) n_switch++;
  end

  always @(posedge clk) out_ready <= stress ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic wait_empty();
    while (exp_q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog cyc=%0d expq=%0d fires=%0d outs=%0d mode=%0d cur=%0d line_cnt=%0d idle=%0d", cyc, exp_q.size(), fire_cyc.size(), out_cyc.size(), opmode, cur_mode, dut.line_cnt, dut.idle_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opmode    = OP_GMMM;
    mat_n     = 16'd8;
    in_valid  = 0;
    cnt_clear = 0;
    for (int e = 0; e < SIZE; e++) begin a_line[e] = '0; b_line[e] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // --- generic, full rate: latency 2N+1, one line per cycle
    fire_cyc.delete(); out_cyc.delete();
    run_gmmm();
    wait_empty();
    check(fire_cyc.size() == N && out_cyc.size() == N, "gmmm line counts");
    for (int i = 1; i < N; i++) check(fire_cyc[i] - fire_cyc[i-1] == 1, "gmmm input rate");
    for (int i = 0; i < N; i++) check(out_cyc[i] - fire_cyc[i] == 2*N+1, $sformatf("gmmm latency %0d", out_cyc[i]-fire_cyc[i]));

    // --- band, full rate: latency 6N-3, one row every 3 cycles
    fire_cyc.delete(); out_cyc.delete();
    run_bmmm(10, N, N);
    wait_empty();
    check(fire_cyc.size() == 10 && out_cyc.size() == 10, "bmmm line counts");
    for (int i = 1; i < 10; i++) check(fire_cyc[i] - fire_cyc[i-1] == 3, "bmmm input rate");
    for (int i = 0; i < 10; i++) check(out_cyc[i] - fire_cyc[i] == 6*N-3, $sformatf("bmmm latency %0d", out_cyc[i]-fire_cyc[i]));

    // --- the document's example band shape (p = 3, q = 2, w = 4)
    run_bmmm(9, 3, 2);
    wait_empty();

    // --- random mix with stalls and back-pressure
    cnt_clear <= 1; @(posedge clk); cnt_clear <= 0;
    tb_stalls = 0;
    stress = 1;
    for (int t = 0; t < 24; t++) begin
      sel = $urandom_range(0, 2);
      if (sel == 0) run_bmmm($urandom_range(1, MAXN), $urandom_range(1, N), $urandom_range(1, N));
      else run_gmmm();
    end
    wait_empty();
    stress = 0;
    repeat (2) @(posedge clk);
    check(cnt_stalls == 32'(tb_stalls), $sformatf("stall counter %0d vs %0d", cnt_stalls, tb_stalls));
    check(cnt_cycles > cnt_stalls && cnt_lines > 0, "busy cycle counter");

    check(n_starve > 0, "input starvation stall never happened");
    check(n_backp  > 0, "output back-pressure never happened");
    check(n_bubble > 0, "bubble never happened");
    check(n_switch >= 2, "mode switch never happened");
    $display("mechanisms: starve=%0d backpressure=%0d bubbles=%0d switches=%0d gmmm=%0d bmmm=%0d",
             n_starve, n_backp, n_bubble, n_switch, n_gmmm, n_bmmm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
