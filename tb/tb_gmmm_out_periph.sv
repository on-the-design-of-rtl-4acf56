// tb_gmmm_out_periph: random edge values, tags and enable. After enabled
// cycle E the output row for tag row i must hold, for j >= i, the east edge
// value of row 2N-2-(j-i) from cycle E and, for j < i, the south edge value of
// column 2N-2-(i-j) from enabled cycle E-(i-j). A taken row while disabled
// must empty the output register.
module tb_gmmm_out_periph;
  localparam int unsigned N    = 4;
  localparam int unsigned SIZE = 2*N-1;
  localparam int unsigned AW   = 32;

  logic clk = 0, rst_n = 0, en = 0, out_take = 0, tag_valid = 0, tag_last = 0;
  always #5 clk = ~clk;
  logic [$clog2(N)-1:0] tag_row = '0;
  logic [AW-1:0] c_south [SIZE];
  logic [AW-1:0] c_east [SIZE];
  logic out_valid, out_last;
  logic [AW-1:0] out_line [N];

  gmmm_out_periph #(.MAT_SIZE(N), .ACC_WIDTH(AW)) dut (.*);

  int checks = 0, failures = 0;
  typedef logic [AW-1:0] edge_t [SIZE];
  edge_t hs [$];
  logic [AW-1:0] el [N];
  logic ev = 0, elast = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < SIZE; l++) begin c_south[l] = '0; c_east[l] = '0; end
    for (int j = 0; j < N; j++) el[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== ev || out_last !== elast) begin
        failures++;
        $display("FAIL t=%0d valid/last %0d %0d expected %0d %0d", t, out_valid, out_last, ev, elast);
      end
      for (int j = 0; j < N; j++) begin
        checks++;
        if (out_line[j] !== el[j]) begin
          failures++;
          $display("FAIL t=%0d element %0d: %0d expected %0d", t, j, out_line[j], el[j]);
        end
      end
      en        = ($urandom_range(0, 4) != 0);
      out_take  = ($urandom_range(0, 1) == 1);
      tag_valid = ($urandom_range(0, 1) == 1);
      tag_last  = ($urandom_range(0, 1) == 1);
      tag_row   = $clog2(N)'($urandom_range(0, N-1));
      for (int l = 0; l < SIZE; l++) begin c_south[l] = AW'($urandom); c_east[l] = AW'($urandom); end
      if (en) begin
        hs.push_back(c_south);
        for (int j = 0; j < N; j++) begin
          automatic int i = int'(tag_row);
          if (j >= i) el[j] = c_east[SIZE-1-(j-i)];
          else        el[j] = (hs.size() > i-j) ? hs[hs.size()-1-(i-j)][SIZE-1-(i-j)] : '0;
        end
        ev    = tag_valid;
        elast = tag_valid && tag_last;
      end else if (out_take) begin
        ev    = 0;
        elast = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
