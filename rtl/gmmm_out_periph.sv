// gmmm_out_periph: output steering for generic (dense) matrix multiplication.
//
// In generic mode the finished sums leave the array at its south and east
// edges. Element c(i,j) with j >= i leaves the east edge at row
// 2N-2-(j-i) on cycle T+i, and c(i,j) with j < i leaves the south edge at
// column 2N-2-(i-j) on cycle T+j, i.e. i-j cycles early. The south outputs of
// columns N-1 .. 2N-3 therefore pass through delay blocks of 2N-2-s cycles, so
// that the whole of row i is present at once on cycle T+i. A steering network,
// driven by the row index carried alongside the data, gathers the row and a
// register presents it: one row of C per cycle, in order.
//
// Timing: tag_valid/tag_row/tag_last must arrive in the cycle the row is
// gathered (the kernel delays its line tags for that); out_* follow one enabled
// cycle later. en stalls everything. out_take reports that the presented row
// was taken, which empties the output register even while the array is
// stalled. The position of the delay blocks at the
// output is this design's choice.
module gmmm_out_periph #(
  parameter int unsigned MAT_SIZE   = 16,
  parameter int unsigned ACC_WIDTH  = 32,
  localparam int unsigned SIZE      = 2*MAT_SIZE-1,
  localparam int unsigned ROW_W     = (MAT_SIZE > 1) ? $clog2(MAT_SIZE) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [ACC_WIDTH-1:0] c_south [SIZE],
  input  logic [ACC_WIDTH-1:0] c_east  [SIZE],
  input  logic                 out_take,
  input  logic                 tag_valid,
  input  logic                 tag_last,
  input  logic [ROW_W-1:0]     tag_row,
  output logic                 out_valid,
  output logic                 out_last,
  output logic [ACC_WIDTH-1:0] out_line [MAT_SIZE]
);

  // South edge after the delay blocks; columns below N-1 never carry results.
  logic [ACC_WIDTH-1:0] south_d [SIZE];

  for (genvar s = 0; s < SIZE; s++) begin : g_d
    if (s < MAT_SIZE-1) begin : g_unused
      assign south_d[s] = '0;
    end else begin : g_dl
      delay_line #(.WIDTH(ACC_WIDTH), .DEPTH(SIZE-1-s)) u_d (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (en),
        .d_in  (c_south[s]),
        .d_out (south_d[s])
      );
    end
  end

  logic [ACC_WIDTH-1:0] gathered [MAT_SIZE];

  always_comb begin
    for (int unsigned j = 0; j < MAT_SIZE; j++) begin
      if (j >= 32'(tag_row)) gathered[j] = c_east[SIZE-1 - (j - 32'(tag_row))];
      else                   gathered[j] = south_d[SIZE-1 - (32'(tag_row) - j)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      for (int unsigned j = 0; j < MAT_SIZE; j++) out_line[j] <= '0;
    end else if (!en && out_take) begin
      // Row taken while the array is stalled for input: empty the register.
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else if (en) begin
      out_valid <= tag_valid;
      out_last  <= tag_valid && tag_last;
      out_line  <= gathered;
    end
  end

endmodule
