// stall_counter: running-rate instrumentation of the kernel.
//
// Counts, while the kernel has work (busy), the cycles that pass, the cycles
// in which the array was stalled (advance low) and the lines the kernel took
// in. The running rate of the kernel is lines / cycles; the stall share is
// stalls / cycles. clear zeroes the counters synchronously; counters saturate
// at their maximum. Counter width and the exact events counted are this
// design's choices.
module stall_counter #(
  parameter int unsigned CNT_WIDTH = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 busy,
  input  logic                 advance,
  input  logic                 line_in,
  output logic [CNT_WIDTH-1:0] cycles,
  output logic [CNT_WIDTH-1:0] stalls,
  output logic [CNT_WIDTH-1:0] lines
);

  function automatic logic [CNT_WIDTH-1:0] sat_inc(input logic [CNT_WIDTH-1:0] v);
    return (&v) ? v : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles <= '0;
      stalls <= '0;
      lines  <= '0;
    end else if (clear) begin
      cycles <= '0;
      stalls <= '0;
      lines  <= '0;
    end else if (busy) begin
      cycles <= sat_inc(cycles);
      if (!advance) stalls <= sat_inc(stalls);
      if (line_in)  lines  <= sat_inc(lines);
    end
  end

endmodule
