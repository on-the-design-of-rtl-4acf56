// tb_chunk_reader: packs random matrices of random vector length and count
// into 256-bit chunks (back to back, each matrix starting on a chunk
// boundary), streams them in with random gaps, takes vectors with random
// back-pressure and compares every vector with the one packed. Vectors that
// straddle two chunks are counted and must occur. With 128-bit vectors and no
// back-pressure, two vectors must come out of each chunk on back-to-back cycles.
module tb_chunk_reader;
  localparam int unsigned CHW = 256;
  localparam int unsigned EW  = 8;
  localparam int unsigned ME  = 31;
  localparam int unsigned VB  = ME*EW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [$clog2(ME+1)-1:0] vec_len;
  logic [15:0]    n_vecs;
  logic           in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [CHW-1:0] in_data = '0;
  logic [VB-1:0]  out_data;

  chunk_reader #(.CHUNK_WIDTH(CHW), .ELEM_WIDTH(EW), .MAX_ELEMS(ME)) dut (.*);

  int checks = 0, failures = 0, straddles = 0;
  logic [VB-1:0]  exp_q [$];
  logic [CHW-1:0] chunk_q [$];
  bit stress = 1;
  int outs_at [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic make(int len, int n);
    bit bits [$];
    for (int v = 0; v < n; v++) begin
      logic [VB-1:0] x = '0;
      if ((bits.size() % CHW) != 0 && (bits.size() % CHW) + len*EW > CHW) straddles++;
      for (int b = 0; b < len*EW; b++) begin
        x[b] = 1'($urandom_range(0, 1));
        bits.push_back(x[b]);
      end
      exp_q.push_back(x);
    end
    while (bits.size() != 0) begin
      logic [CHW-1:0] c = '0;
      for (int b = 0; b < CHW && bits.size() != 0; b++) c[b] = bits.pop_front();
      chunk_q.push_back(c);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      outs_at.push_back(cyc);
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: extra vector");
      end else begin
        logic [VB-1:0] e;
        e = exp_q.pop_front();
        if (out_data !== e) begin failures++; $display("FAIL: %h expected %h", out_data, e); end
      end
    end
    out_ready <= stress ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic feed();
    while (chunk_q.size() != 0) begin
      @(negedge clk);
      if (stress) while ($urandom_range(0, 2) == 0) @(negedge clk);
      in_data  = chunk_q.pop_front();
      in_valid = 1;
      forever begin
        bit t;
        #1 t = in_ready;
        @(posedge clk);
        if (t) break;
        @(negedge clk);
      end
      #1 in_valid = 0;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_len = 4; n_vecs = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 40; m++) begin
      @(negedge clk);
      vec_len = $clog2(ME+1)'((m == 0) ? ME : $urandom_range(1, ME));
      n_vecs  = 16'($urandom_range(1, 20));
      make(int'(vec_len), int'(n_vecs));
      feed();
      while (exp_q.size() != 0) @(posedge clk);
    end
    // rate: 128-bit vectors, no gaps
    stress = 0;
    @(negedge clk);
    vec_len = 16; n_vecs = 8;
    outs_at.delete();
    make(16, 8);
    feed();
    while (exp_q.size() != 0) @(posedge clk);
    for (int i = 1; i < 8; i += 2) begin
      checks++;
      if (outs_at[i] - outs_at[i-1] != 1) begin failures++; $display("FAIL: vector pair not back to back"); end
    end
    checks++;
    if (straddles == 0) begin failures++; $display("FAIL: no straddling vector"); end
    $display("straddling vectors: %0d", straddles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
