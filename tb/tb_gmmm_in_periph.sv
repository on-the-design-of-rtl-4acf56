// tb_gmmm_in_periph: random lines with random valid, row index and enable;
// after each enabled cycle the west and north edges must hold the line
// steered so that element k sits on lane row-k+N-1 and all other lanes are
// zero; a disabled cycle must leave the edges unchanged.
module tb_gmmm_in_periph;
  localparam int unsigned N    = 5;
  localparam int unsigned SIZE = 2*N-1;
  localparam int unsigned DW   = 8;

  logic clk = 0, rst_n = 0, en = 0, valid = 0;
  always #5 clk = ~clk;
  logic [$clog2(N)-1:0] row = '0;
  logic [DW-1:0] a_line [N];
  logic [DW-1:0] b_line [N];
  logic [DW-1:0] a_west [SIZE];
  logic [DW-1:0] b_north [SIZE];

  gmmm_in_periph #(.MAT_SIZE(N), .DATA_WIDTH(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] ea [SIZE];
  logic [DW-1:0] eb [SIZE];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < SIZE; l++) begin ea[l] = '0; eb[l] = '0; end
    for (int k = 0; k < N; k++) begin a_line[k] = '0; b_line[k] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int l = 0; l < SIZE; l++) begin
        checks++;
        if (a_west[l] !== ea[l] || b_north[l] !== eb[l]) begin
          failures++;
          $display("FAIL t=%0d lane %0d: %0d %0d expected %0d %0d", t, l, a_west[l], b_north[l], ea[l], eb[l]);
        end
      end
      en    = ($urandom_range(0, 4) != 0);
      valid = ($urandom_range(0, 3) != 0);
      row   = $clog2(N)'($urandom_range(0, N-1));
      for (int k = 0; k < N; k++) begin a_line[k] = DW'($urandom); b_line[k] = DW'($urandom); end
      if (en) begin
        for (int l = 0; l < SIZE; l++) begin
          automatic int k = int'(row) + N - 1 - l;
          ea[l] = (valid && k >= 0 && k < N) ? a_line[k] : '0;
          eb[l] = (valid && k >= 0 && k < N) ? b_line[k] : '0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
