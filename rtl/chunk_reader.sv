// chunk_reader: rebuilds data vectors from wide memory transfers.
//
// Memory delivers data in chunks of CHUNK_WIDTH bits (256 on the target
// platform). An operand matrix is stored as n_vecs vectors of vec_len elements
// of ELEM_WIDTH bits, packed back to back with element 0 of vector 0 in the
// least significant bits of the first chunk, so a vector may straddle two
// chunks. The matrix starts on a chunk boundary and the unused bits after its
// last vector are padding.
//
// The reader keeps a bit buffer: it appends each chunk above the bits it
// already holds and hands out the lowest vec_len*ELEM_WIDTH bits as a vector
// whenever that many are present. It loads exactly the chunks of one matrix,
// and after the last vector of the matrix it drops the padding. vec_len and
// n_vecs are sampled when the first chunk of a matrix is taken.
//
// Interfaces: valid/ready on both sides; out_data bits above the vector length
// are zero. A vector is available in the cycle after the chunk that completes
// it is taken. Chunk width is the document's; the packing is this design's.
module chunk_reader #(
  parameter int unsigned CHUNK_WIDTH = 256,
  parameter int unsigned ELEM_WIDTH  = 8,
  parameter int unsigned MAX_ELEMS   = 31,
  parameter int unsigned N_WIDTH     = 16,
  localparam int unsigned VB_MAX     = MAX_ELEMS*ELEM_WIDTH,
  localparam int unsigned LEN_W      = $clog2(MAX_ELEMS+1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [LEN_W-1:0]       vec_len,
  input  logic [N_WIDTH-1:0]     n_vecs,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [CHUNK_WIDTH-1:0] in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [VB_MAX-1:0]      out_data
);

  localparam int unsigned CAP   = CHUNK_WIDTH + VB_MAX;
  localparam int unsigned CNT_W = $clog2(CAP+1);

  logic [CAP-1:0]     buf_q, buf_shift;
  logic [CNT_W-1:0]   cnt_q, cnt_after;
  logic               active_q;
  logic [31:0]        vbits_q, chunks_left_q;
  logic [N_WIDTH-1:0] vecs_left_q;
  logic [31:0]        vbits_new, chunks_new;
  logic               in_fire, out_fire, last_vec;
  logic [VB_MAX-1:0]  mask;

  assign vbits_new  = 32'(vec_len) * ELEM_WIDTH;
  assign chunks_new = (32'(n_vecs) * vbits_new + CHUNK_WIDTH - 1) / CHUNK_WIDTH;

  assign out_valid = active_q && (32'(cnt_q) >= vbits_q) && (vbits_q != 0);
  assign out_fire  = out_valid && out_ready;
  assign last_vec  = (vecs_left_q == N_WIDTH'(1));
  assign mask      = ~({VB_MAX{1'b1}} << vbits_q);
  assign out_data  = buf_q[VB_MAX-1:0] & mask;

  assign cnt_after = out_fire ? cnt_q - CNT_W'(vbits_q) : cnt_q;
  assign buf_shift = out_fire ? buf_q >> vbits_q : buf_q;

  always_comb begin
    if (!active_q) in_ready = (n_vecs != '0) && (vec_len != '0);
    else           in_ready = (chunks_left_q != 0) && !(out_fire && last_vec) &&
                              (32'(cnt_after) + CHUNK_WIDTH <= CAP);
  end
  assign in_fire = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q         <= '0;
      cnt_q         <= '0;
      active_q      <= 1'b0;
      vbits_q       <= '0;
      chunks_left_q <= '0;
      vecs_left_q   <= '0;
    end else begin
      if (!active_q) begin
        if (in_fire) begin
          active_q      <= 1'b1;
          vbits_q       <= vbits_new;
          chunks_left_q <= chunks_new - 1;
          vecs_left_q   <= n_vecs;
          buf_q         <= CAP'(in_data);
          cnt_q         <= CNT_W'(CHUNK_WIDTH);
        end
      end else if (out_fire && last_vec) begin
        // Last vector of the matrix: drop the padding that follows it.
        active_q <= 1'b0;
        buf_q    <= '0;
        cnt_q    <= '0;
      end else begin
        if (out_fire) vecs_left_q <= vecs_left_q - 1'b1;
        if (in_fire) begin
          buf_q         <= buf_shift | (CAP'(in_data) << cnt_after);
          cnt_q         <= cnt_after + CNT_W'(CHUNK_WIDTH);
          chunks_left_q <= chunks_left_q - 1;
        end else begin
          buf_q <= buf_shift;
          cnt_q <= cnt_after;
        end
      end
    end
  end

endmodule
