// ummm_kernel: unified matrix-matrix multiplier (UMMM) kernel.
//
// One (2N-1) x (2N-1) array of multiply-add elements serves two operations,
// chosen by opmode:
//   OP_GMMM  C = A*B for dense N x N matrices. An operation is N input lines:
//            line i = row i of A (a_line[0..N-1]) and column i of B
//            (b_line[0..N-1]). Lines are taken one per cycle and the rows of
//            C come out one per cycle (c_line[0..N-1], c_len = N), 2N+1 cycles
//            after the matching input line.
//   OP_BMMM  C = A*B for band matrices of mat_n rows in the centred band format
//            of bmmm_in_periph (2N-1 elements per row of A and B, 4N-3 per row
//            of C, c_len = 4N-3). One row pair is taken every third cycle, and
//            row i of C comes out 6N-3 cycles after row pair i.
//
// Flow control: the array, both peripheral sets and the line tags advance
// together on one enable. The enable drops (a stall) when the output holds a
// line that is not taken, or when an operation has started and its next line
// is not there yet. Between operations the kernel keeps running with empty
// lines (bubbles) so that results drain without new input. When opmode
// differs from the current mode at an operation boundary, the kernel stops
// taking lines, drains the array completely and then switches: the diagonal
// paths are rerouted only when the array is empty. The stall counter records
// busy cycles, stalled cycles and lines taken.
//
// The reuse of one array for both operations, the opmode control, the line
// per cycle generic rate, the three cycles per band line and the stall counter
// follow the document. The handshake, the drain rule, the tag pipeline and the
// line formats are this design's choices.
//
// The assertions at the end are disabled while rst_n is low; a lint tool
// sees that use of rst_n next to the asynchronous reset of the registers and
// reports a net used both ways. It is a checker only and adds no logic.
module ummm_kernel
  import ummm_pkg::*;
#(
  parameter int unsigned MAT_SIZE   = 16,
  parameter int unsigned DATA_WIDTH = 8,
  parameter int unsigned ACC_WIDTH  = 32,
  parameter int unsigned N_WIDTH    = 16,
  localparam int unsigned SIZE      = 2*MAT_SIZE-1,
  localparam int unsigned CW        = 2*SIZE-1,
  localparam int unsigned LEN_W     = $clog2(CW+1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  opmode_e               opmode,
  input  logic [N_WIDTH-1:0]    mat_n,
  output opmode_e               cur_mode,
  // input lines
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [DATA_WIDTH-1:0] a_line [SIZE],
  input  logic [DATA_WIDTH-1:0] b_line [SIZE],
  // output lines
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic                  out_last,
  output logic [LEN_W-1:0]      out_len,
  output logic [ACC_WIDTH-1:0]  c_line [CW],
  // stall counter
  input  logic                  cnt_clear,
  output logic [31:0]           cnt_cycles,
  output logic [31:0]           cnt_stalls,
  output logic [31:0]           cnt_lines
);

  localparam int unsigned ROW_W     = (MAT_SIZE > 1) ? $clog2(MAT_SIZE) : 1;
  localparam int unsigned TAG_LEN   = 6*MAT_SIZE-4;   // band gather cycle - 1
  localparam int unsigned G_TAP     = 2*MAT_SIZE-1;
  localparam int unsigned B_TAP     = 6*MAT_SIZE-5;
  // Bubbles needed before every register of the array path holds zero.
  localparam int unsigned DRAIN     = TAG_LEN + 4*SIZE;
  localparam int unsigned IDLE_W    = $clog2(DRAIN+1);

  typedef struct packed {
    logic             valid;
    logic             last;
    logic [ROW_W-1:0] row;
  } tag_t;

  // ---------------------------------------------------------------- control
  logic                adv;
  logic                fire;
  logic [N_WIDTH-1:0]  line_cnt;
  logic [N_WIDTH-1:0]  op_len_q;
  logic [N_WIDTH-1:0]  op_len;
  logic [1:0]          phase;
  logic [IDLE_W-1:0]   idle_cnt;
  logic                at_boundary, switch_pending, slot_ok, out_blocked, starve;
  logic                drained, line_last;
  tag_t                tags [TAG_LEN];

  assign at_boundary    = (line_cnt == '0);
  assign switch_pending = at_boundary && (opmode != cur_mode);
  assign slot_ok        = (cur_mode == OP_GMMM) || (phase == 2'd0);
  assign out_blocked    = out_valid && !out_ready;
  assign in_ready       = !out_blocked && slot_ok && !switch_pending;
  assign fire           = in_valid && in_ready;
  assign starve         = !out_blocked && slot_ok && !at_boundary && !in_valid;
  assign adv            = !out_blocked && !starve;
  assign drained        = (idle_cnt == IDLE_W'(DRAIN)) && !out_valid;

  assign op_len    = at_boundary ? ((cur_mode == OP_GMMM) ? N_WIDTH'(MAT_SIZE) : mat_n)
                                 : op_len_q;
  assign line_last = (line_cnt == op_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_mode <= OP_GMMM;
      line_cnt <= '0;
      op_len_q <= '0;
      phase    <= '0;
      idle_cnt <= IDLE_W'(DRAIN);
    end else begin
      if (switch_pending && drained) begin
        cur_mode <= opmode;
        phase    <= '0;
      end else if (adv && cur_mode == OP_BMMM) begin
        phase <= (phase == 2'(BMMM_SLOT-1)) ? 2'd0 : phase + 2'd1;
      end
      if (fire) begin
        op_len_q <= op_len;
        line_cnt <= line_last ? '0 : line_cnt + 1'b1;
      end
      if (adv) begin
        if (fire)                          idle_cnt <= '0;
        else if (idle_cnt != IDLE_W'(DRAIN)) idle_cnt <= idle_cnt + 1'b1;
      end
    end
  end

  // Line tags travel with the data and mark where a result row is complete.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned m = 0; m < TAG_LEN; m++) tags[m] <= '0;
    end else if (adv) begin
      tags[0] <= '{valid: fire, last: fire && line_last, row: ROW_W'(line_cnt)};
      for (int unsigned m = 1; m < TAG_LEN; m++) tags[m] <= tags[m-1];
    end
  end

  // ---------------------------------------------------------------- datapath
  logic [DATA_WIDTH-1:0] a_g [MAT_SIZE];
  logic [DATA_WIDTH-1:0] b_g [MAT_SIZE];
  logic [DATA_WIDTH-1:0] g_west [SIZE], g_north [SIZE];
  logic [DATA_WIDTH-1:0] b_west [SIZE], b_north [SIZE];
  logic [DATA_WIDTH-1:0] a_west [SIZE], a_north [SIZE];
  logic [ACC_WIDTH-1:0]  c_n [SIZE], c_w [SIZE], c_s [SIZE], c_e [SIZE];

  always_comb begin
    for (int unsigned k = 0; k < MAT_SIZE; k++) begin
      a_g[k] = a_line[k];
      b_g[k] = b_line[k];
    end
  end

  gmmm_in_periph #(.MAT_SIZE(MAT_SIZE), .DATA_WIDTH(DATA_WIDTH)) u_gin (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (adv),
    .valid   (fire && cur_mode == OP_GMMM),
    .row     (ROW_W'(line_cnt)),
    .a_line  (a_g),
    .b_line  (b_g),
    .a_west  (g_west),
    .b_north (g_north)
  );

  bmmm_in_periph #(.MAT_SIZE(MAT_SIZE), .DATA_WIDTH(DATA_WIDTH)) u_bin (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (adv),
    .valid   (fire && cur_mode == OP_BMMM),
    .a_row   (a_line),
    .b_row   (b_line),
    .a_west  (b_west),
    .b_north (b_north)
  );

  always_comb begin
    for (int unsigned k = 0; k < SIZE; k++) begin
      a_west[k]  = (cur_mode == OP_BMMM) ? b_west[k]  : g_west[k];
      a_north[k] = (cur_mode == OP_BMMM) ? b_north[k] : g_north[k];
    end
  end

  ummm_array #(.SIZE(SIZE), .DATA_WIDTH(DATA_WIDTH), .ACC_WIDTH(ACC_WIDTH)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (adv),
    .opmode  (cur_mode),
    .a_west  (a_west),
    .b_north (a_north),
    .c_north (c_n),
    .c_west  (c_w),
    .c_south (c_s),
    .c_east  (c_e)
  );

  logic                 g_valid, g_last, bm_valid, bm_last;
  logic [ACC_WIDTH-1:0] g_line [MAT_SIZE];
  logic [ACC_WIDTH-1:0] bm_line [CW];

  gmmm_out_periph #(.MAT_SIZE(MAT_SIZE), .ACC_WIDTH(ACC_WIDTH)) u_gout (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (adv),
    .c_south   (c_s),
    .c_east    (c_e),
    .out_take  (out_valid && out_ready),
    .tag_valid (tags[G_TAP].valid && cur_mode == OP_GMMM),
    .tag_last  (tags[G_TAP].last),
    .tag_row   (tags[G_TAP].row),
    .out_valid (g_valid),
    .out_last  (g_last),
    .out_line  (g_line)
  );

  bmmm_out_periph #(.MAT_SIZE(MAT_SIZE), .ACC_WIDTH(ACC_WIDTH)) u_bout (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (adv),
    .c_north   (c_n),
    .c_west    (c_w),
    .out_take  (out_valid && out_ready),
    .tag_valid (tags[B_TAP].valid && cur_mode == OP_BMMM),
    .tag_last  (tags[B_TAP].last),
    .out_valid (bm_valid),
    .out_last  (bm_last),
    .out_line  (bm_line)
  );

  assign out_valid = g_valid || bm_valid;
  assign out_last  = (cur_mode == OP_BMMM) ? bm_last : g_last;
  assign out_len   = (cur_mode == OP_BMMM) ? LEN_W'(CW) : LEN_W'(MAT_SIZE);

  always_comb begin
    for (int unsigned e = 0; e < CW; e++) begin
      if (cur_mode == OP_BMMM)  c_line[e] = bm_line[e];
      else if (e < MAT_SIZE)    c_line[e] = g_line[e];
      else                      c_line[e] = '0;
    end
  end

  // ---------------------------------------------------------------- counters
  stall_counter #(.CNT_WIDTH(32)) u_stall (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (cnt_clear),
    .busy    (in_valid || !drained),
    .advance (adv),
    .line_in (fire),
    .cycles  (cnt_cycles),
    .stalls  (cnt_stalls),
    .lines   (cnt_lines)
  );

  // A held output line must stay stable until it is taken.
  property p_out_stable;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_last);
  endproperty
  a_out_stable: assert property (p_out_stable);

  // The operating mode only changes while the array is empty.
  a_switch_empty: assert property (@(posedge clk) disable iff (!rst_n)
    $changed(cur_mode) |-> $past(drained));

endmodule
