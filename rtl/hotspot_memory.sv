// hotspot_memory: shared double buffer of hot spot records.
//
// Two banks of MAX_HOTSPOTS records, one record per hot spot id. The "current"
// bank collects the partial results of the frame being segmented; the "previous"
// bank holds the final results of the last complete frame, which are read out
// for transmission while the current frame is processed. The banks change roles
// on swap, given with the last pixel's write of a frame.
//
// Current side: two combinational read ports (id1 and id2 of the reconstructor)
// and one write port, all written on the rising edge. A separate valid bit per
// record is set when a hot spot is created (wr_new) and cleared when it is
// absorbed by another one (kill_en); all valid bits of a bank are cleared in one
// clock when it becomes current, so record contents never need clearing. The
// bank also counts its valid records and keeps the frame's overflow flag.
// Previous side: a synchronous read port (data and valid bit one clock after the
// address), the number of valid hot spots, the overflow flag, and prev_ready, a
// one-clock pulse the clock after a swap.
//
// The double-buffer organisation and record contents follow the design; the
// split into record array plus valid-bit vector, the valid counter and the
// read-port timing are this implementation's choices. The record array is
// written as a memory so that it maps onto block RAM; the current-side reads are
// asynchronous because read, update and write-back of a record happen in one
// pixel clock.
`include "hotspot_defs.svh"

module hotspot_memory
  import hotspot_pkg::*;
#(
  parameter int unsigned IM_WIDTH     = hotspot_pkg::DEF_IM_WIDTH,
  parameter int unsigned IM_HEIGHT    = hotspot_pkg::DEF_IM_HEIGHT,
  parameter int unsigned MAX_HOTSPOTS = hotspot_pkg::DEF_MAX_HOTSPOTS,
  localparam int unsigned ID_W  = $clog2(MAX_HOTSPOTS),
  localparam int unsigned XW    = $clog2(IM_WIDTH),
  localparam int unsigned YW    = $clog2(IM_HEIGHT),
  localparam int unsigned CNT_W = $clog2(IM_WIDTH * IM_HEIGHT + 1),
  localparam int unsigned SX_W  = XW + CNT_W,
  localparam int unsigned SY_W  = YW + CNT_W,
  localparam int unsigned REC_W = 2 * XW + SX_W + 2 * YW + SY_W + CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // current frame side
  input  logic [ID_W-1:0]  rd1_addr,
  output logic [REC_W-1:0] rd1_data,
  input  logic [ID_W-1:0]  rd2_addr,
  output logic [REC_W-1:0] rd2_data,
  input  logic             wr_en,
  input  logic             wr_new,
  input  logic [ID_W-1:0]  wr_addr,
  input  logic [REC_W-1:0] wr_data,
  input  logic             kill_en,
  input  logic [ID_W-1:0]  kill_addr,
  input  logic             swap,          // end of frame: banks change roles
  input  logic             swap_overflow, // the ending frame ran out of ids
  // previous frame side
  input  logic [ID_W-1:0]  prev_addr,
  output logic [REC_W-1:0] prev_data,
  output logic             prev_valid,
  output logic [ID_W:0]    prev_count,
  output logic             prev_overflow,
  output logic             prev_ready
);

  logic [REC_W-1:0]        mem [2][MAX_HOTSPOTS];
  logic [MAX_HOTSPOTS-1:0] vld [2];
  logic                    cur;          // index of the current bank
  logic [ID_W:0]           cur_count;

  // current-side reads
  assign rd1_data = mem[cur][rd1_addr];
  assign rd2_data = mem[cur][rd2_addr];

  always_ff @(posedge clk) begin
    if (wr_en) mem[cur][wr_addr] <= wr_data;
  end

  // previous-side synchronous read
  always_ff @(posedge clk) begin
    prev_data <= mem[~cur][prev_addr];
  end

  logic [ID_W:0] count_upd;
  always_comb begin
    count_upd = cur_count;
    if (wr_new)  count_upd = count_upd + 1'b1;
    if (kill_en) count_upd = count_upd - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld[0]        <= '0;
      vld[1]        <= '0;
      cur           <= 1'b0;
      cur_count     <= '0;
      prev_count    <= '0;
      prev_overflow <= 1'b0;
      prev_ready    <= 1'b0;
      prev_valid    <= 1'b0;
    end else begin
      prev_valid <= vld[~cur][prev_addr];
      prev_ready <= swap;
      if (wr_new)  vld[cur][wr_addr]   <= 1'b1;
      if (kill_en) vld[cur][kill_addr] <= 1'b0;
      if (swap) begin
        cur           <= ~cur;
        vld[~cur]     <= '0;
        prev_count    <= count_upd;
        prev_overflow <= swap_overflow;
        cur_count     <= '0;
      end else begin
        cur_count <= count_upd;
      end
    end
  end

endmodule
