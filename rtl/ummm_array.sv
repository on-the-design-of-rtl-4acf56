// ummm_array: the multi-directional systolic core of the unified multiplier.
//
// A SIZE x SIZE grid of KLPEs (SIZE = 2N-1 for N x N generic matrices). Row r,
// column s. The A operands enter on the west edge (a_west[r]) and move east one
// element per cycle; the B operands enter on the north edge (b_north[s]) and move
// south. The partial sums move along the diagonals, and the opmode reroutes them:
//
//   OP_BMMM  C moves north-west: element (r,s) takes its C from (r+1,s+1).
//            This is the Kung-Leiserson band array. Sums enter at the south and
//            east edges as zero and leave at the north (c_north) and west
//            (c_west) edges.
//   OP_GMMM  C moves south-east: element (r,s) takes its C from (r-1,s-1).
//            Sums enter at the north and west edges as zero and leave at the
//            south (c_south) and east (c_east) edges.
//
// Using one grid of KLPEs for both operations and switching the diagonal paths
// with the opmode follows the document; the exact direction of the rerouted
// paths and the placement of the edges are this design's reading of it.
// Every edge output is the registered C' of the element on that edge, so all
// results leave the array one cycle after their last multiply-add. en stalls
// the whole grid. Change opmode only while no operation is in flight.
module ummm_array
  import ummm_pkg::*;
#(
  parameter int unsigned SIZE       = 31,
  parameter int unsigned DATA_WIDTH = 8,
  parameter int unsigned ACC_WIDTH  = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  opmode_e               opmode,
  input  logic [DATA_WIDTH-1:0] a_west  [SIZE],
  input  logic [DATA_WIDTH-1:0] b_north [SIZE],
  output logic [ACC_WIDTH-1:0]  c_north [SIZE],
  output logic [ACC_WIDTH-1:0]  c_west  [SIZE],
  output logic [ACC_WIDTH-1:0]  c_south [SIZE],
  output logic [ACC_WIDTH-1:0]  c_east  [SIZE]
);

  logic [DATA_WIDTH-1:0] a_q [SIZE][SIZE];
  logic [DATA_WIDTH-1:0] b_q [SIZE][SIZE];
  logic [ACC_WIDTH-1:0]  c_q [SIZE][SIZE];

  for (genvar r = 0; r < SIZE; r++) begin : g_row
    for (genvar s = 0; s < SIZE; s++) begin : g_col
      logic [DATA_WIDTH-1:0] a_i, b_i;
      logic [ACC_WIDTH-1:0]  c_nw, c_se, c_i;

      if (s == 0) begin : g_aw
        assign a_i = a_west[r];
      end else begin : g_ai
        assign a_i = a_q[r][s-1];
      end

      if (r == 0) begin : g_bn
        assign b_i = b_north[s];
      end else begin : g_bi
        assign b_i = b_q[r-1][s];
      end

      // Sum arriving from the north-west neighbour (generic mode).
      if (r == 0 || s == 0) begin : g_cnw0
        assign c_nw = '0;
      end else begin : g_cnw
        assign c_nw = c_q[r-1][s-1];
      end

      // Sum arriving from the south-east neighbour (band mode).
      if (r == SIZE-1 || s == SIZE-1) begin : g_cse0
        assign c_se = '0;
      end else begin : g_cse
        assign c_se = c_q[r+1][s+1];
      end

      assign c_i = (opmode == OP_BMMM) ? c_se : c_nw;

      klpe #(.DATA_WIDTH(DATA_WIDTH), .ACC_WIDTH(ACC_WIDTH)) u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (en),
        .a_in  (a_i),
        .b_in  (b_i),
        .c_in  (c_i),
        .a_out (a_q[r][s]),
        .b_out (b_q[r][s]),
        .c_out (c_q[r][s])
      );
    end
  end

  for (genvar k = 0; k < SIZE; k++) begin : g_edge
    assign c_north[k] = c_q[0][k];
    assign c_west[k]  = c_q[k][0];
    assign c_south[k] = c_q[SIZE-1][k];
    assign c_east[k]  = c_q[k][SIZE-1];
  end

endmodule
