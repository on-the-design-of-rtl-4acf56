// tb_klpe: checks the processing element against C' = C + A*B.
// Random operands, random enable; the registered outputs must equal the
// previous enabled cycle's inputs (A, B) and sum (C), and hold while disabled.
module tb_klpe;
  localparam int unsigned DW = 8;
  localparam int unsigned AW = 32;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [DW-1:0] a_in = '0, b_in = '0, a_out, b_out;
  logic [AW-1:0] c_in = '0, c_out;

  klpe #(.DATA_WIDTH(DW), .ACC_WIDTH(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] ea = '0, eb = '0;
  logic [AW-1:0] ec = '0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (a_out !== ea || b_out !== eb || c_out !== ec) begin
        failures++;
        $display("FAIL: got %0d %0d %0d expected %0d %0d %0d", a_out, b_out, c_out, ea, eb, ec);
      end
      en   = ($urandom_range(0, 4) != 0);
      a_in = DW'($urandom);
      b_in = DW'($urandom);
      c_in = (t % 50 == 7) ? 32'hFFFF_FFF0 : AW'($urandom);   // wrap-around case
      if (en) begin
        ea = a_in;
        eb = b_in;
        ec = c_in + AW'(int'(a_in) * int'(b_in));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
