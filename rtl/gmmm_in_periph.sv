// gmmm_in_periph: input steering for generic (dense) matrix multiplication.
//
// One operation streams N lines of each operand, one line per cycle: line i
// carries row i of A and column i of B (B is therefore sent column by column).
// Element k of the A line is steered onto array row  i - k + N - 1 and element k
// of the B line onto array column i - k + N - 1; all other edge inputs get zero.
// With this placement, a(i,k) and b(k,j) meet in element (i-k+N-1, j-k+N-1)
// on cycle i + j - k (relative), which is where the partial sum c(i,j), travelling
// south-east, passes by. Lines of one operation must follow each other on
// consecutive enabled cycles; between operations a cycle with valid low
// injects zeros (a bubble).
//
// Timing: a line presented with valid in an enabled cycle is on the array
// edge in the next cycle (one register stage). row is the line index i.
// Sending B column-wise and the zero fill are this design's choices.
module gmmm_in_periph #(
  parameter int unsigned MAT_SIZE   = 16,
  parameter int unsigned DATA_WIDTH = 8,
  localparam int unsigned SIZE      = 2*MAT_SIZE-1,
  localparam int unsigned ROW_W     = (MAT_SIZE > 1) ? $clog2(MAT_SIZE) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  valid,
  input  logic [ROW_W-1:0]      row,
  input  logic [DATA_WIDTH-1:0] a_line  [MAT_SIZE],
  input  logic [DATA_WIDTH-1:0] b_line  [MAT_SIZE],
  output logic [DATA_WIDTH-1:0] a_west  [SIZE],
  output logic [DATA_WIDTH-1:0] b_north [SIZE]
);

  logic [DATA_WIDTH-1:0] a_steer [SIZE];
  logic [DATA_WIDTH-1:0] b_steer [SIZE];

  always_comb begin
    for (int unsigned p = 0; p < SIZE; p++) begin
      a_steer[p] = '0;
      b_steer[p] = '0;
    end
    if (valid) begin
      for (int unsigned k = 0; k < MAT_SIZE; k++) begin
        a_steer[32'(row) + MAT_SIZE - 1 - k] = a_line[k];
        b_steer[32'(row) + MAT_SIZE - 1 - k] = b_line[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < SIZE; p++) begin
        a_west[p]  <= '0;
        b_north[p] <= '0;
      end
    end else if (en) begin
      a_west  <= a_steer;
      b_north <= b_steer;
    end
  end

endmodule
