// tb_bmmm_out_periph: random edge values, tags and enable. After enabled
// cycle E, element e >= SIZE-1 of the output row must be the north edge value
// of column d = e-(SIZE-1) from enabled cycle E-(SIZE-1-d), and element
// e < SIZE-1 the west edge value of row r = SIZE-1-e from enabled cycle
// E-(SIZE-1+2r). A taken row while disabled must empty the output register.
module tb_bmmm_out_periph;
  localparam int unsigned N    = 3;
  localparam int unsigned SIZE = 2*N-1;
  localparam int unsigned CW   = 2*SIZE-1;
  localparam int unsigned AW   = 32;

  logic clk = 0, rst_n = 0, en = 0, out_take = 0, tag_valid = 0, tag_last = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] c_north [SIZE];
  logic [AW-1:0] c_west [SIZE];
  logic out_valid, out_last;
  logic [AW-1:0] out_line [CW];

  bmmm_out_periph #(.MAT_SIZE(N), .ACC_WIDTH(AW)) dut (.*);

  int checks = 0, failures = 0;
  typedef logic [AW-1:0] edge_t [SIZE];
  edge_t hn [$];
  edge_t hw [$];
  logic [AW-1:0] el [CW];
  logic ev = 0, elast = 0;

  function automatic logic [AW-1:0] pick(ref edge_t h [$], input int back, input int l);
    return (h.size() > back) ? h[h.size()-1-back][l] : '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < SIZE; l++) begin c_north[l] = '0; c_west[l] = '0; end
    for (int e = 0; e < CW; e++) el[e] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== ev || out_last !== elast) begin
        failures++;
        $display("FAIL t=%0d valid/last", t);
      end
      for (int e = 0; e < CW; e++) begin
        checks++;
        if (out_line[e] !== el[e]) begin
          failures++;
          $display("FAIL t=%0d element %0d: %0d expected %0d", t, e, out_line[e], el[e]);
        end
      end
      en        = ($urandom_range(0, 4) != 0);
      out_take  = ($urandom_range(0, 1) == 1);
      tag_valid = ($urandom_range(0, 1) == 1);
      tag_last  = ($urandom_range(0, 1) == 1);
      for (int l = 0; l < SIZE; l++) begin c_north[l] = AW'($urandom); c_west[l] = AW'($urandom); end
      if (en) begin
        hn.push_back(c_north);
        hw.push_back(c_west);
        for (int e = 0; e < CW; e++) begin
          if (e >= int'(SIZE)-1) el[e] = pick(hn, SIZE-1-(e-(SIZE-1)), e-(SIZE-1));
          else                   el[e] = pick(hw, SIZE-1+2*(SIZE-1-e), SIZE-1-e);
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
