// klpe: Kung-Leiserson processing element.
//
// Three inputs A, B, C and three outputs A, B, C'. Every cycle the element
// computes C' = C + A*B and forwards A and B unchanged; all three outputs are
// registered, so each value moves one element per cycle. This behaviour is the
// one the unified array is built from. Operands are unsigned, the product is
// zero-extended to the accumulator width and the sum wraps modulo 2^ACC_WIDTH
// (signedness and accumulator width are this design's choices).
//
// en freezes all three registers (global stall of the array). rst_n clears them.
module klpe #(
  parameter int unsigned DATA_WIDTH = 8,
  parameter int unsigned ACC_WIDTH  = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [DATA_WIDTH-1:0] a_in,
  input  logic [DATA_WIDTH-1:0] b_in,
  input  logic [ACC_WIDTH-1:0]  c_in,
  output logic [DATA_WIDTH-1:0] a_out,
  output logic [DATA_WIDTH-1:0] b_out,
  output logic [ACC_WIDTH-1:0]  c_out
);

  logic [2*DATA_WIDTH-1:0] prod;
  assign prod = a_in * b_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out <= '0;
      b_out <= '0;
      c_out <= '0;
    end else if (en) begin
      a_out <= a_in;
      b_out <= b_in;
      c_out <= c_in + ACC_WIDTH'(prod);
    end
  end

endmodule
