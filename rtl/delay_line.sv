// delay_line: the delay block (D) of the systolic arrays.
//
// A shift register of DEPTH stages on a WIDTH-bit value: what is on d_in in an
// enabled cycle appears on d_out DEPTH enabled cycles later. DEPTH = 0 is a plain
// wire. The array stalls as a whole, so the register only shifts when en is high.
// Stages reset to zero so that an empty stage injects a zero into the array.
// With DEPTH = 0 there is no register, so clk, rst_n and en are left unused
// and a lint tool reports them as unused signals; the ports are kept so that
// every lane of a peripheral can be built from the same generate loop.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d_in,
  output logic [WIDTH-1:0] d_out
);

  if (DEPTH == 0) begin : g_wire
    assign d_out = d_in;
  end else begin : g_reg
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else if (en) begin
        stage[0] <= d_in;
        for (int unsigned i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end
    assign d_out = stage[DEPTH-1];
  end

endmodule
