// chunk_writer: packs result vectors into wide memory transfers.
//
// The reverse of chunk_reader. Each incoming vector has in_len elements of
// ELEM_WIDTH bits; vectors are appended back to back into a bit buffer and
// every CHUNK_WIDTH bits are sent as one chunk, lowest bits first. A vector
// flagged in_last ends a matrix: the bits that remain are sent as a final,
// zero-padded chunk flagged out_last, so the next matrix again starts on a
// chunk boundary.
//
// Interfaces: valid/ready on both sides. A chunk is offered in the cycle after
// the vector that completes it is taken. While the final chunk of a matrix is
// pending no vector is taken, except in the cycle that chunk leaves, so that
// back-to-back matrices keep the output busy every cycle; in_ready therefore
// depends on out_ready in that cycle. Chunk width is the document's; the
// packing is this design's.
module chunk_writer #(
  parameter int unsigned CHUNK_WIDTH = 256,
  parameter int unsigned ELEM_WIDTH  = 32,
  parameter int unsigned MAX_ELEMS   = 61,
  localparam int unsigned VB_MAX     = MAX_ELEMS*ELEM_WIDTH,
  localparam int unsigned LEN_W      = $clog2(MAX_ELEMS+1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic                   in_last,
  input  logic [LEN_W-1:0]       in_len,
  input  logic [VB_MAX-1:0]      in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic                   out_last,
  output logic [CHUNK_WIDTH-1:0] out_data
);

  localparam int unsigned CAP   = CHUNK_WIDTH + VB_MAX;
  localparam int unsigned CNT_W = $clog2(CAP+1);

  logic [CAP-1:0]    buf_q, buf_after;
  logic [CNT_W-1:0]  cnt_q, cnt_after;
  logic              flush_q;
  logic [31:0]       vbits;
  logic [VB_MAX-1:0] mask;
  logic              in_fire, out_fire;

  assign vbits     = 32'(in_len) * ELEM_WIDTH;
  assign mask      = ~({VB_MAX{1'b1}} << vbits);

  assign out_valid = (32'(cnt_q) >= CHUNK_WIDTH) || (flush_q && cnt_q != '0);
  assign out_last  = flush_q && (32'(cnt_q) <= CHUNK_WIDTH);
  assign out_data  = buf_q[CHUNK_WIDTH-1:0];
  assign out_fire  = out_valid && out_ready;

  assign cnt_after = !out_fire ? cnt_q :
                     (32'(cnt_q) > CHUNK_WIDTH) ? cnt_q - CNT_W'(CHUNK_WIDTH) : '0;
  assign buf_after = out_fire ? buf_q >> CHUNK_WIDTH : buf_q;

  assign in_ready  = (!flush_q || (out_fire && out_last)) && (vbits != 0) && (32'(cnt_after) + vbits <= CAP);
  assign in_fire   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q   <= '0;
      cnt_q   <= '0;
      flush_q <= 1'b0;
    end else begin
      if (in_fire) begin
        buf_q <= buf_after | (CAP'(in_data & mask) << cnt_after);
        cnt_q <= cnt_after + CNT_W'(vbits);
      end else begin
        buf_q <= buf_after;
        cnt_q <= cnt_after;
      end
      if (in_fire && in_last)            flush_q <= 1'b1;
      else if (out_fire && out_last)     flush_q <= 1'b0;
    end
  end

endmodule
