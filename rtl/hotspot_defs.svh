// hotspot_defs.svh: record layout of one hot spot, shared by every module that
// stores or moves hot spot records. Expand inside a module that defines the
// localparams XW, YW, CNT_W, SX_W and SY_W, which every such module
// derives from its frame size in its parameter list:
//   XW = clog2(IM_WIDTH), YW = clog2(IM_HEIGHT), CNT_W = clog2(IM_WIDTH*IM_HEIGHT+1),
//   SX_W = XW + CNT_W, SY_W = YW + CNT_W, REC_W = 2*XW + SX_W + 2*YW + SY_W + CNT_W.
`ifndef HOTSPOT_DEFS_SVH
`define HOTSPOT_DEFS_SVH

`define HS_REC_TYPEDEF \
  typedef struct packed { \
    logic [XW-1:0]    max_x; \
    logic [XW-1:0]    min_x; \
    logic [SX_W-1:0]  sum_x; \
    logic [YW-1:0]    max_y; \
    logic [YW-1:0]    min_y; \
    logic [SY_W-1:0]  sum_y; \
    logic [CNT_W-1:0] cnt;   \
  } hs_rec_t;

`endif
