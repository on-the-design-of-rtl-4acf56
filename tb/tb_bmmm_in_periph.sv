// tb_bmmm_in_periph: random band rows with random valid and enable. After
// enabled cycle E the west lane r must carry element SIZE-1-r of the row taken
// in enabled cycle E-2(SIZE-1-r), and north lane s element s of the row taken
// in enabled cycle E-(s+N-1); a cycle without valid counts as a zero row.
module tb_bmmm_in_periph;
  localparam int unsigned N    = 4;
  localparam int unsigned SIZE = 2*N-1;
  localparam int unsigned DW   = 8;

  logic clk = 0, rst_n = 0, en = 0, valid = 0;
  always #5 clk = ~clk;
  logic [DW-1:0] a_row [SIZE];
  logic [DW-1:0] b_row [SIZE];
  logic [DW-1:0] a_west [SIZE];
  logic [DW-1:0] b_north [SIZE];

  bmmm_in_periph #(.MAT_SIZE(N), .DATA_WIDTH(DW)) dut (.*);

  int checks = 0, failures = 0;
  typedef logic [DW-1:0] row_t [SIZE];
  row_t ha [$];
  row_t hb [$];

  function automatic logic [DW-1:0] pick(ref row_t h [$], input int back, input int e);
    return (h.size() > back) ? h[h.size()-1-back][e] : '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < SIZE; l++) begin a_row[l] = '0; b_row[l] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      for (int l = 0; l < SIZE; l++) begin
        logic [DW-1:0] ea, eb;
        ea = pick(ha, 2*(SIZE-1-l), SIZE-1-l);
        eb = pick(hb, l + N - 1, l);
        checks++;
        if (a_west[l] !== ea || b_north[l] !== eb) begin
          failures++;
          $display("FAIL t=%0d lane %0d: %0d %0d expected %0d %0d", t, l, a_west[l], b_north[l], ea, eb);
        end
      end
      en    = ($urandom_range(0, 4) != 0);
      valid = ($urandom_range(0, 2) != 0);
      for (int l = 0; l < SIZE; l++) begin a_row[l] = DW'($urandom); b_row[l] = DW'($urandom); end
      if (en) begin
        row_t ra, rb;
        for (int l = 0; l < SIZE; l++) begin
          ra[l] = valid ? a_row[l] : '0;
          rb[l] = valid ? b_row[l] : '0;
        end
        ha.push_back(ra);
        hb.push_back(rb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
