// hotspot_reconstructor: read-modify-write of the hot spot records.
//
// For every command of the raw processing stage it reads the record of id1
// (hot_spot_x) and of id2 (hot_spot_y) from the current buffer of the hot spot
// memory, folds in the coordinates of the current pixel and, on a unification,
// the whole record of id2, and writes the result back to id1 - all within the
// same clock. Per field:
//   max_x = max(X, id1.max_x, id2.max_x)   min_x = min(X, id1.min_x, id2.min_x)
//   sum_x = X + id1.sum_x + id2.sum_x      (likewise for Y)
//   cnt   = 1 + id1.cnt + id2.cnt
// where the id1 operand is replaced by a neutral value when the pixel opens a new
// hot spot ("new?") and the id2 operand is replaced by a neutral value unless the
// command unifies ("unify?"). The comparator/adder structure and the neutral 0 for
// the maximum follow the design's reconstructor drawing; using all-ones as the
// neutral value of the minimum is this implementation's choice. On a unification
// it also asks the memory to mark id2 invalid.
//
// Timing: purely combinational. The read addresses follow cmd_id1/cmd_id2; the
// memory must return the read data in the same cycle and performs wr_en and
// kill_en on the next rising edge.
`include "hotspot_defs.svh"

module hotspot_reconstructor
  import hotspot_pkg::*;
#(
  parameter int unsigned IM_WIDTH     = hotspot_pkg::DEF_IM_WIDTH,
  parameter int unsigned IM_HEIGHT    = hotspot_pkg::DEF_IM_HEIGHT,
  parameter int unsigned MAX_HOTSPOTS = hotspot_pkg::DEF_MAX_HOTSPOTS,
  localparam int unsigned ID_W = $clog2(MAX_HOTSPOTS),
  localparam int unsigned XW    = $clog2(IM_WIDTH),
  localparam int unsigned YW    = $clog2(IM_HEIGHT),
  localparam int unsigned CNT_W = $clog2(IM_WIDTH * IM_HEIGHT + 1),
  localparam int unsigned SX_W  = XW + CNT_W,
  localparam int unsigned SY_W  = YW + CNT_W,
  localparam int unsigned REC_W = 2 * XW + SX_W + 2 * YW + SY_W + CNT_W
) (
  // command from raw processing
  input  logic            cmd_valid,
  input  hs_op_e          cmd_op,
  input  logic [ID_W-1:0] cmd_id1,
  input  logic [ID_W-1:0] cmd_id2,
  input  logic [XW-1:0]   cmd_x,
  input  logic [YW-1:0]   cmd_y,
  // reads of the current buffer
  output logic [ID_W-1:0]  rd1_addr,
  input  logic [REC_W-1:0] rd1_data,
  output logic [ID_W-1:0]  rd2_addr,
  input  logic [REC_W-1:0] rd2_data,
  // write-back to the current buffer
  output logic             wr_en,
  output logic             wr_new,     // record id1 becomes valid
  output logic [ID_W-1:0]  wr_addr,
  output logic [REC_W-1:0] wr_data,
  output logic             kill_en,    // record id2 becomes invalid
  output logic [ID_W-1:0]  kill_addr
);

  `HS_REC_TYPEDEF

  hs_rec_t r1, r2, a, b, w;
  logic    is_new, is_unify;

  always_comb begin
    rd1_addr = cmd_id1;
    rd2_addr = cmd_id2;
    r1       = hs_rec_t'(rd1_data);
    r2       = hs_rec_t'(rd2_data);
    is_new   = (cmd_op == OP_NEW);
    is_unify = (cmd_op == OP_UNIFY);

    // operand from id1: neutral when the pixel opens a new hot spot
    a = r1;
    if (is_new) begin
      a       = '0;
      a.min_x = '1;
      a.min_y = '1;
    end
    // operand from id2: neutral unless two hot spots are unified
    b = r2;
    if (!is_unify) begin
      b       = '0;
      b.min_x = '1;
      b.min_y = '1;
    end

    w.max_x = (cmd_x > a.max_x) ? cmd_x : a.max_x;
    w.max_x = (b.max_x > w.max_x) ? b.max_x : w.max_x;
    w.min_x = (cmd_x < a.min_x) ? cmd_x : a.min_x;
    w.min_x = (b.min_x < w.min_x) ? b.min_x : w.min_x;
    w.max_y = (cmd_y > a.max_y) ? cmd_y : a.max_y;
    w.max_y = (b.max_y > w.max_y) ? b.max_y : w.max_y;
    w.min_y = (cmd_y < a.min_y) ? cmd_y : a.min_y;
    w.min_y = (b.min_y < w.min_y) ? b.min_y : w.min_y;
    w.sum_x = SX_W'(cmd_x) + a.sum_x + b.sum_x;
    w.sum_y = SY_W'(cmd_y) + a.sum_y + b.sum_y;
    w.cnt   = CNT_W'(1) + a.cnt + b.cnt;

    wr_en     = cmd_valid && (cmd_op != OP_NONE);
    wr_new    = cmd_valid && is_new;
    wr_addr   = cmd_id1;
    wr_data   = REC_W'(w);
    kill_en   = cmd_valid && is_unify;
    kill_addr = cmd_id2;
  end

endmodule
