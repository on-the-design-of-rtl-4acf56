// tb_delay_line: checks the delay block at several depths.
// A random stream is pushed with a random enable; each output must equal the
// value pushed DEPTH enabled cycles earlier (zero before that).
module tb_delay_line;
  localparam int unsigned W = 12;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [W-1:0] d_in = '0;
  logic [W-1:0] d_out0, d_out1, d_out5;

  delay_line #(.WIDTH(W), .DEPTH(0)) u0 (.clk, .rst_n, .en, .d_in, .d_out(d_out0));
  delay_line #(.WIDTH(W), .DEPTH(1)) u1 (.clk, .rst_n, .en, .d_in, .d_out(d_out1));
  delay_line #(.WIDTH(W), .DEPTH(5)) u5 (.clk, .rst_n, .en, .d_in, .d_out(d_out5));

  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  function automatic logic [W-1:0] past(int d);
    return (hist.size() >= d) ? hist[hist.size()-d] : '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      en   = ($urandom_range(0, 3) != 0);
      d_in = W'($urandom);
      #1;
      checks += 3;
      if (d_out0 !== d_in)     begin failures++; $display("FAIL depth 0"); end
      if (d_out1 !== past(1))  begin failures++; $display("FAIL depth 1: %h vs %h", d_out1, past(1)); end
      if (d_out5 !== past(5))  begin failures++; $display("FAIL depth 5: %h vs %h", d_out5, past(5)); end
      @(posedge clk);
      if (en) hist.push_back(d_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
