// bmmm_out_periph: output collection for band matrix multiplication.
//
// In band mode the finished sums leave the array at its north and west edges.
// C band rows have 2*SIZE-1 elements: element e of row i is c(i, i+e-(SIZE-1)).
// With d = j-i, c(i,j) for d >= 0 leaves the north edge at column d on cycle
// T+3i+d; for d < 0 it leaves the west edge at row -d on cycle T+3i+2d. Delay
// lines of SIZE-1-d cycles (north) and SIZE-1+2|d| cycles (west) line all
// elements of row i up on cycle T+3i+SIZE-1, where a register presents the row.
// This is the band input dispatch run in reverse.
//
// Timing: tag_valid/tag_last arrive in the cycle the row is lined up; out_*
// follow one enabled cycle later. en stalls everything. out_take reports that
// the presented row was taken, which empties the output register even while
// the array is stalled.
module bmmm_out_periph #(
  parameter int unsigned MAT_SIZE  = 16,
  parameter int unsigned ACC_WIDTH = 32,
  localparam int unsigned SIZE     = 2*MAT_SIZE-1,
  localparam int unsigned CW       = 2*SIZE-1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [ACC_WIDTH-1:0] c_north [SIZE],
  input  logic [ACC_WIDTH-1:0] c_west  [SIZE],
  input  logic                 out_take,
  input  logic                 tag_valid,
  input  logic                 tag_last,
  output logic                 out_valid,
  output logic                 out_last,
  output logic [ACC_WIDTH-1:0] out_line [CW]
);

  logic [ACC_WIDTH-1:0] north_d [SIZE];
  logic [ACC_WIDTH-1:0] west_d  [SIZE];

  for (genvar k = 0; k < SIZE; k++) begin : g_d
    delay_line #(.WIDTH(ACC_WIDTH), .DEPTH(SIZE-1-k)) u_dn (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .d_in  (c_north[k]),
      .d_out (north_d[k])
    );
    if (k == 0) begin : g_corner
      // The corner element is the north edge's column 0.
      assign west_d[k] = north_d[0];
    end else begin : g_w
      delay_line #(.WIDTH(ACC_WIDTH), .DEPTH(SIZE-1+2*k)) u_dw (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (en),
        .d_in  (c_west[k]),
        .d_out (west_d[k])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      for (int unsigned e = 0; e < CW; e++) out_line[e] <= '0;
    end else if (!en && out_take) begin
      // Row taken while the array is stalled for input: empty the register.
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else if (en) begin
      out_valid <= tag_valid;
      out_last  <= tag_valid && tag_last;
      for (int unsigned e = 0; e < CW; e++) begin
        if (e >= SIZE-1) out_line[e] <= north_d[e-(SIZE-1)];
        else             out_line[e] <= west_d[SIZE-1-e];
      end
    end
  end

endmodule
