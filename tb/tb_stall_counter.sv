// tb_stall_counter: random busy/advance/line activity; the three counters
// must match counts kept here, clear must zero them, and saturation is
// checked with a narrow counter.
module tb_stall_counter;
  logic clk = 0, rst_n = 0, clear = 0, busy = 0, advance = 0, line_in = 0;
  always #5 clk = ~clk;
  logic [31:0] cycles, stalls, lines;
  logic [3:0]  c4, s4, l4;

  stall_counter #(.CNT_WIDTH(32)) dut (.*);
  stall_counter #(.CNT_WIDTH(4)) u_narrow (.clk, .rst_n, .clear(1'b0), .busy, .advance,
                                           .line_in, .cycles(c4), .stalls(s4), .lines(l4));

  int checks = 0, failures = 0;
  int ec = 0, es = 0, el = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      checks++;
      if (cycles != 32'(ec) || stalls != 32'(es) || lines != 32'(el)) begin
        failures++;
        $display("FAIL t=%0d: %0d %0d %0d expected %0d %0d %0d", t, cycles, stalls, lines, ec, es, el);
      end
      clear   = (t == 400);
      busy    = ($urandom_range(0, 5) != 0);
      advance = ($urandom_range(0, 2) != 0);
      line_in = advance && ($urandom_range(0, 1) == 1);
      if (clear) begin ec = 0; es = 0; el = 0; end
      else if (busy) begin
        ec++;
        if (!advance) es++;
        if (line_in) el++;
      end
    end
    checks++;
    if (c4 != 4'hF) begin failures++; $display("FAIL: narrow counter did not saturate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
