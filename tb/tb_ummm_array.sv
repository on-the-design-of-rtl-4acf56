// tb_ummm_array: drives the bare array edges in both configurations.
//
// Generic: row i of A and column i of B are placed on the west and north
// edges on cycle i (element k on lane i-k+N-1); c(i,j) must appear on the east
// edge (j >= i, row 2N-2-(j-i)) on cycle i+2N-1 or on the south edge (j < i,
// column 2N-2-(i-j)) on cycle j+2N-1.
// Band (Kung-Leiserson): a(i,k) enters west lane i-k+N-1 on cycle i+2k and
// b(k,j) enters north lane j-k+N-1 on cycle j+2k; c(i,j) must appear on the
// north edge (column j-i) on cycle 2i+j+2N-1 when j >= i, or on the west
// edge (row i-j) on cycle i+2j+2N-1 when j < i.
// Results are compared with a reference product computed here.
module tb_ummm_array;
  import ummm_pkg::*;
  localparam int unsigned N    = 3;
  localparam int unsigned SIZE = 2*N-1;
  localparam int unsigned DW   = 8;
  localparam int unsigned AW   = 32;
  localparam int NB = 7;   // band matrix dimension

  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;
  opmode_e opmode = OP_GMMM;
  logic [DW-1:0] a_west [SIZE];
  logic [DW-1:0] b_north [SIZE];
  logic [AW-1:0] c_north [SIZE], c_west [SIZE], c_south [SIZE], c_east [SIZE];

  ummm_array #(.SIZE(SIZE), .DATA_WIDTH(DW), .ACC_WIDTH(AW)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned A [NB][NB], B [NB][NB], C [NB][NB];

  task automatic expect_eq(logic [AW-1:0] got, int unsigned want, string what);
    checks++;
    if (got !== AW'(want)) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, want);
    end
  endtask

  function automatic void product(int n);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < n; k++) C[i][j] += A[i][k] * B[k][j];
      end
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < SIZE; l++) begin a_west[l] = '0; b_north[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------- generic
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        A[i][k] = $urandom_range(0, 255);
        B[i][k] = $urandom_range(0, 255);
      end
    product(N);
    opmode = OP_GMMM;
    for (int t = 0; t < 4*N + 2; t++) begin
      @(negedge clk);
      for (int l = 0; l < SIZE; l++) begin a_west[l] = '0; b_north[l] = '0; end
      if (t < N)
        for (int k = 0; k < N; k++) begin
          a_west[t-k+N-1]  = DW'(A[t][k]);
          b_north[t-k+N-1] = DW'(B[k][t]);
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          if (j >= i && t == i + 2*N - 1) expect_eq(c_east[SIZE-1-(j-i)], C[i][j], "gmmm east");
          if (j <  i && t == j + 2*N - 1) expect_eq(c_south[SIZE-1-(i-j)], C[i][j], "gmmm south");
        end
    end
    repeat (4*SIZE) @(negedge clk);

    // ---------------- band, p = N, q = 2
    for (int i = 0; i < NB; i++)
      for (int k = 0; k < NB; k++) begin
        A[i][k] = ((k - i) < N && (i - k) < 2) ? $urandom_range(0, 255) : 0;
        B[i][k] = ((k - i) < 2 && (i - k) < N) ? $urandom_range(0, 255) : 0;
      end
    product(NB);
    @(negedge clk);
    opmode = OP_BMMM;
    for (int t = 0; t < 3*NB + 4*N + 4; t++) begin
      @(negedge clk);
      for (int l = 0; l < SIZE; l++) begin a_west[l] = '0; b_north[l] = '0; end
      for (int i = 0; i < NB; i++)
        for (int k = 0; k < NB; k++) begin
          if (i - k > -int'(N) && i - k < int'(N) && t == i + 2*k) a_west[i-k+N-1] = DW'(A[i][k]);
          if (i - k > -int'(N) && i - k < int'(N) && t == i + 2*k) b_north[i-k+N-1] = DW'(B[k][i]);
        end
      for (int i = 0; i < NB; i++)
        for (int j = 0; j < NB; j++) begin
          if (j >= i && j - i < int'(SIZE) && t == 2*i + j + 2*N - 1) expect_eq(c_north[j-i], C[i][j], "bmmm north");
          if (j <  i && i - j < int'(SIZE) && t == i + 2*j + 2*N - 1) expect_eq(c_west[i-j], C[i][j], "bmmm west");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
