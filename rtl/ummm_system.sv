// ummm_system: the unified matrix-matrix multiplier between its memory ports.
//
// Two chunk readers turn the 256-bit memory transfers of A and B into lines,
// the UMMM kernel multiplies them and a chunk writer packs the result lines of
// C back into 256-bit transfers. This is the data path of the kernel as it sits
// in its host system; the host-side control that launches transfers is outside
// and appears here as configuration inputs and chunk streams.
//
// Memory layout (this design's choice): each operand of an operation starts on
// a chunk boundary. In generic mode (OP_GMMM) A is N rows of N elements and B
// is N columns of N elements (B transposed), elements DATA_WIDTH bits wide; C
// comes back as N rows of N ACC_WIDTH-bit elements. In band mode (OP_BMMM) A
// and B are mat_n rows of 2N-1 elements each in the centred band format and C
// is mat_n rows of 4N-3 elements. Unused bits of the last chunk are padding.
//
// opmode and mat_n must be held from the first chunk of an operation until its
// last result chunk has left; the kernel drains and switches mode on its own.
// All streams are valid/ready. c_last marks the final chunk of each result
// matrix.
//
// The kernel's assertions use rst_n as their disable condition, which a lint
// tool reports as rst_n being used both synchronously and asynchronously;
// it adds no logic.
module ummm_system
  import ummm_pkg::*;
#(
  parameter int unsigned MAT_SIZE    = 16,
  parameter int unsigned DATA_WIDTH  = 8,
  parameter int unsigned ACC_WIDTH   = 32,
  parameter int unsigned CHUNK_WIDTH = ummm_pkg::CHUNK_BITS,
  parameter int unsigned N_WIDTH     = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  opmode_e                opmode,
  input  logic [N_WIDTH-1:0]     mat_n,
  output opmode_e                cur_mode,
  input  logic                   a_valid,
  output logic                   a_ready,
  input  logic [CHUNK_WIDTH-1:0] a_data,
  input  logic                   b_valid,
  output logic                   b_ready,
  input  logic [CHUNK_WIDTH-1:0] b_data,
  output logic                   c_valid,
  input  logic                   c_ready,
  output logic                   c_last,
  output logic [CHUNK_WIDTH-1:0] c_data,
  input  logic                   cnt_clear,
  output logic [31:0]            cnt_cycles,
  output logic [31:0]            cnt_stalls,
  output logic [31:0]            cnt_lines
);

  localparam int unsigned SIZE  = 2*MAT_SIZE-1;
  localparam int unsigned CW    = 2*SIZE-1;
  localparam int unsigned LEN_I = $clog2(SIZE+1);
  localparam int unsigned LEN_O = $clog2(CW+1);

  logic [LEN_I-1:0]           in_len;
  logic [N_WIDTH-1:0]         in_lines;
  logic                       ra_valid, rb_valid, k_in_ready, k_in_valid;
  logic [SIZE*DATA_WIDTH-1:0] ra_data, rb_data;
  logic [DATA_WIDTH-1:0]      a_line [SIZE];
  logic [DATA_WIDTH-1:0]      b_line [SIZE];

  assign in_len   = (opmode == OP_BMMM) ? LEN_I'(SIZE) : LEN_I'(MAT_SIZE);
  assign in_lines = (opmode == OP_BMMM) ? mat_n : N_WIDTH'(MAT_SIZE);

  chunk_reader #(.CHUNK_WIDTH(CHUNK_WIDTH), .ELEM_WIDTH(DATA_WIDTH), .MAX_ELEMS(SIZE),
                 .N_WIDTH(N_WIDTH)) u_rd_a (
    .clk       (clk),
    .rst_n     (rst_n),
    .vec_len   (in_len),
    .n_vecs    (in_lines),
    .in_valid  (a_valid),
    .in_ready  (a_ready),
    .in_data   (a_data),
    .out_valid (ra_valid),
    .out_ready (k_in_ready && rb_valid),
    .out_data  (ra_data)
  );

  chunk_reader #(.CHUNK_WIDTH(CHUNK_WIDTH), .ELEM_WIDTH(DATA_WIDTH), .MAX_ELEMS(SIZE),
                 .N_WIDTH(N_WIDTH)) u_rd_b (
    .clk       (clk),
    .rst_n     (rst_n),
    .vec_len   (in_len),
    .n_vecs    (in_lines),
    .in_valid  (b_valid),
    .in_ready  (b_ready),
    .in_data   (b_data),
    .out_valid (rb_valid),
    .out_ready (k_in_ready && ra_valid),
    .out_data  (rb_data)
  );

  assign k_in_valid = ra_valid && rb_valid;

  always_comb begin
    for (int unsigned k = 0; k < SIZE; k++) begin
      a_line[k] = ra_data[k*DATA_WIDTH +: DATA_WIDTH];
      b_line[k] = rb_data[k*DATA_WIDTH +: DATA_WIDTH];
    end
  end

  logic                 k_out_valid, k_out_ready, k_out_last;
  logic [LEN_O-1:0]     k_out_len;
  logic [ACC_WIDTH-1:0] c_line [CW];
  logic [CW*ACC_WIDTH-1:0] c_flat;

  ummm_kernel #(.MAT_SIZE(MAT_SIZE), .DATA_WIDTH(DATA_WIDTH), .ACC_WIDTH(ACC_WIDTH),
                .N_WIDTH(N_WIDTH)) u_kernel (
    .clk        (clk),
    .rst_n      (rst_n),
    .opmode     (opmode),
    .mat_n      (mat_n),
    .cur_mode   (cur_mode),
    .in_valid   (k_in_valid),
    .in_ready   (k_in_ready),
    .a_line     (a_line),
    .b_line     (b_line),
    .out_valid  (k_out_valid),
    .out_ready  (k_out_ready),
    .out_last   (k_out_last),
    .out_len    (k_out_len),
    .c_line     (c_line),
    .cnt_clear  (cnt_clear),
    .cnt_cycles (cnt_cycles),
    .cnt_stalls (cnt_stalls),
    .cnt_lines  (cnt_lines)
  );

  always_comb begin
    for (int unsigned e = 0; e < CW; e++) c_flat[e*ACC_WIDTH +: ACC_WIDTH] = c_line[e];
  end

  chunk_writer #(.CHUNK_WIDTH(CHUNK_WIDTH), .ELEM_WIDTH(ACC_WIDTH), .MAX_ELEMS(CW)) u_wr (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (k_out_valid),
    .in_ready  (k_out_ready),
    .in_last   (k_out_last),
    .in_len    (k_out_len),
    .in_data   (c_flat),
    .out_valid (c_valid),
    .out_ready (c_ready),
    .out_last  (c_last),
    .out_data  (c_data)
  );

endmodule
