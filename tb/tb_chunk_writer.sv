// tb_chunk_writer: random result vectors of random length, grouped into
// matrices; the chunks coming out must equal the vectors packed back to back
// into 256-bit chunks, with the last chunk of each matrix zero padded and
// flagged. Random gaps on the input and back-pressure on the output.
module tb_chunk_writer;
  localparam int unsigned CHW = 256;
  localparam int unsigned EW  = 32;
  localparam int unsigned ME  = 13;
  localparam int unsigned VB  = ME*EW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0, out_last;
  logic [$clog2(ME+1)-1:0] in_len = '0;
  logic [VB-1:0]  in_data = '0;
  logic [CHW-1:0] out_data;

  chunk_writer #(.CHUNK_WIDTH(CHW), .ELEM_WIDTH(EW), .MAX_ELEMS(ME)) dut (.*);

  int checks = 0, failures = 0, padded = 0;
  typedef struct { logic [CHW-1:0] d; logic last; } chunk_t;
  chunk_t exp_q [$];

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: extra chunk");
      end else begin
        chunk_t e;
        e = exp_q.pop_front();
        if (out_data !== e.d || out_last !== e.last) begin
          failures++; $display("FAIL: %h/%0d expected %h/%0d", out_data, out_last, e.d, e.last);
        end
      end
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic send(logic [VB-1:0] v, int len, bit last);
    @(negedge clk);
    while ($urandom_range(0, 2) == 0) @(negedge clk);
    in_data  = v | (VB'($urandom) << (len*EW));   // junk above the length is ignored
    in_len   = $clog2(ME+1)'(len);
    in_last  = last;
    in_valid = 1;
    forever begin
      bit t;
      #1 t = in_ready;
      @(posedge clk);
      if (t) break;
      @(negedge clk);
    end
    #1 in_valid = 0;
  endtask

  task automatic one_matrix();
    int len = $urandom_range(1, ME);
    int n   = $urandom_range(1, 12);
    bit bits [$];
    logic [VB-1:0] vs [$];
    for (int v = 0; v < n; v++) begin
      logic [VB-1:0] x = '0;
      for (int b = 0; b < len*EW; b++) begin x[b] = 1'($urandom_range(0, 1)); bits.push_back(x[b]); end
      vs.push_back(x);
    end
    if (bits.size() % CHW != 0) padded++;
    while (bits.size() != 0) begin
      chunk_t c;
      c.d = '0;
      for (int b = 0; b < CHW && bits.size() != 0; b++) c.d[b] = bits.pop_front();
      c.last = (bits.size() == 0);
      exp_q.push_back(c);
    end
    for (int v = 0; v < n; v++) send(vs[v], len, v == n-1);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 30; m++) one_matrix();
    while (exp_q.size() != 0) @(posedge clk);
    checks++;
    if (padded == 0) begin failures++; $display("FAIL: no padded chunk"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
