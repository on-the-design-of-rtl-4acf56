// bmmm_in_periph: input dispatch for band matrix multiplication.
//
// Band rows use a fixed, diagonal-centred format of SIZE = 2N-1 elements:
// element e of row i of A is a(i, i+e-(N-1)), and element e of row k of B is
// b(k, k+e-(N-1)). Elements outside the matrix are sent as zero. Any A and B
// whose bands lie within N-1 diagonals of the main diagonal fit.
//
// On the Kung-Leiserson schedule the array consumes a whole column of A on its
// west edge and a whole row of B on its north edge, both skewed by one cycle
// per lane, once every three cycles. Rows of A and B arrive together, one pair
// every three cycles, so the peripheral buffers them in per-lane delay lines:
// A element e goes to west lane SIZE-1-e after 2e cycles (elements further
// right in the row are needed later), B element s goes to north lane s after
// s+N-1 cycles. Then a(i,k) and b(k,j) meet in element (i-k+N-1, j-k+N-1) on
// cycle i+j+k+3N-2 after the first row pair was taken, and the partial sum
// c(i,j), travelling north-west one element per cycle, collects them. The delay lines are the internal buffers that
// give the array access to several rows at once.
//
// Timing: a row pair presented with valid in an enabled cycle is captured in
// the next cycle; element lanes then reach the array after their lane delay.
// Cycles without valid inject zeros. The centred format and the delay values
// are this design's choices.
module bmmm_in_periph #(
  parameter int unsigned MAT_SIZE   = 16,
  parameter int unsigned DATA_WIDTH = 8,
  localparam int unsigned SIZE      = 2*MAT_SIZE-1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  valid,
  input  logic [DATA_WIDTH-1:0] a_row   [SIZE],
  input  logic [DATA_WIDTH-1:0] b_row   [SIZE],
  output logic [DATA_WIDTH-1:0] a_west  [SIZE],
  output logic [DATA_WIDTH-1:0] b_north [SIZE]
);

  logic [DATA_WIDTH-1:0] a_q [SIZE];
  logic [DATA_WIDTH-1:0] b_q [SIZE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < SIZE; p++) begin
        a_q[p] <= '0;
        b_q[p] <= '0;
      end
    end else if (en) begin
      for (int unsigned p = 0; p < SIZE; p++) begin
        a_q[p] <= valid ? a_row[p] : '0;
        b_q[p] <= valid ? b_row[p] : '0;
      end
    end
  end

  for (genvar r = 0; r < SIZE; r++) begin : g_lane
    // West lane r carries A diagonal r-(N-1), i.e. band element SIZE-1-r.
    delay_line #(.WIDTH(DATA_WIDTH), .DEPTH(2*(SIZE-1-r))) u_da (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .d_in  (a_q[SIZE-1-r]),
      .d_out (a_west[r])
    );
    delay_line #(.WIDTH(DATA_WIDTH), .DEPTH(r + MAT_SIZE - 1)) u_db (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .d_in  (b_q[r]),
      .d_out (b_north[r])
    );
  end

endmodule
