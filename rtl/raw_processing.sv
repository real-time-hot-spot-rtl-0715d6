// raw_processing: on-the-fly labelling of hot pixels into hot spots.
//
// For every classified pixel (one per pixel clock enable, in raster order) this
// stage decides whether the pixel is cold, starts a new hot spot, joins the hot
// spot of its left or upper neighbour, or joins two different hot spots and so
// unifies them. It does this with only the list L of the hot spot ids of the last
// IM_WIDTH pixels, built as a shift chain of list_record instances: record 0
// holds the id of the left neighbour pixel(m,n-1), record IM_WIDTH-1 the id of the
// upper neighbour pixel(m-1,n). Each enable the id of the current pixel is pushed
// in, every record moves one place, the oldest is dropped and, on a unification,
// every copy of the absorbed id is replaced by the surviving id in the same clock.
// This follows the design's algorithm and its list-record structure.
//
// Choices of this implementation: neighbours are 4-connected (left and upper)
// as in the algorithm; the left neighbour is ignored in column 0 and the upper
// one in line 0; when two different ids meet, the smaller id survives (the
// algorithm states the case id(x) < id(y), the other order is handled
// symmetrically). Ids are handed out in increasing order from 1 in every frame
// and never reused inside a frame; id 0 means cold. When all MAX_HOTSPOTS-1 ids
// of a frame are used, a further new hot spot is dropped (its pixel is treated as
// cold) and the frame is flagged as overflowed.
//
// Interface / timing: inputs are sampled when in_valid is high; the decision is
// registered, so cmd_* is valid one clock later for exactly one clock and carries
// the operation for the hot spot reconstructor together with the pixel
// coordinates. cmd_eof marks the last pixel of the frame, and cmd_overflow (valid
// with cmd_eof) tells whether the frame ran out of ids.
module raw_processing
  import hotspot_pkg::*;
#(
  parameter int unsigned IM_WIDTH     = hotspot_pkg::DEF_IM_WIDTH,
  parameter int unsigned IM_HEIGHT    = hotspot_pkg::DEF_IM_HEIGHT,
  parameter int unsigned MAX_HOTSPOTS = hotspot_pkg::DEF_MAX_HOTSPOTS,
  localparam int unsigned ID_W = $clog2(MAX_HOTSPOTS),
  localparam int unsigned XW   = $clog2(IM_WIDTH),
  localparam int unsigned YW   = $clog2(IM_HEIGHT)
) (
  input  logic          clk,
  input  logic          rst_n,
  // classified pixel stream
  input  logic          in_valid,
  input  logic          in_hot,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic          in_sof,      // first pixel of a frame
  input  logic          in_eof,      // last pixel of a frame
  // command to the hot spot reconstructor
  output logic            cmd_valid,
  output hs_op_e          cmd_op,
  output logic [ID_W-1:0] cmd_id1,   // hot_spot_x: target of the update
  output logic [ID_W-1:0] cmd_id2,   // hot_spot_y: absorbed on OP_UNIFY
  output logic [XW-1:0]   cmd_x,
  output logic [YW-1:0]   cmd_y,
  output logic            cmd_eof,
  output logic            cmd_overflow
);

  // ---------------------------------------------------------------- list L
  logic [ID_W-1:0] rec_q   [IM_WIDTH];
  logic [ID_W-1:0] rec_fwd [IM_WIDTH];
  logic [ID_W-1:0] push_id;
  logic            unify;
  logic [ID_W-1:0] id_x, id_y;

  for (genvar i = 0; i < IM_WIDTH; i++) begin : g_list
    list_record #(.ID_W(ID_W)) u_rec (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (in_valid),
      .id_in  ((i == 0) ? push_id : rec_fwd[(i == 0) ? 0 : i - 1]),
      .unify  (unify),
      .id_x   (id_x),
      .id_y   (id_y),
      .id_q   (rec_q[i]),
      .id_fwd (rec_fwd[i])
    );
  end

  // ---------------------------------------------------------------- decision
  logic [ID_W-1:0] left_id, up_id;
  logic [ID_W:0]   next_id, cur_next;   // one extra bit to detect exhaustion
  logic            ovf_flag;            // sticky overflow of the current frame
  logic            refuse;
  hs_op_e          op;
  logic [ID_W-1:0] id1, id2;

  always_comb begin
    left_id  = (in_x == '0) ? '0 : rec_q[0];
    up_id    = (in_y == '0) ? '0 : rec_q[IM_WIDTH-1];
    cur_next = in_sof ? (ID_W+1)'(1) : next_id;
    refuse   = 1'b0;
    op       = OP_NONE;
    id1      = '0;
    id2      = '0;
    if (in_hot) begin
      if (left_id == '0 && up_id == '0) begin
        if (cur_next < (ID_W+1)'(MAX_HOTSPOTS)) begin
          op  = OP_NEW;
          id1 = cur_next[ID_W-1:0];
        end else begin
          refuse = 1'b1;
        end
      end else if (left_id == '0) begin
        op  = OP_ADD;
        id1 = up_id;
      end else if (up_id == '0 || up_id == left_id) begin
        op  = OP_ADD;
        id1 = left_id;
      end else begin
        op  = OP_UNIFY;
        id1 = (up_id < left_id) ? up_id : left_id;
        id2 = (up_id < left_id) ? left_id : up_id;
      end
    end
    push_id = id1;              // 0 for a cold or refused pixel
    unify   = (op == OP_UNIFY);
    id_x    = id1;
    id_y    = id2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_id      <= (ID_W+1)'(1);
      ovf_flag     <= 1'b0;
      cmd_valid    <= 1'b0;
      cmd_op       <= OP_NONE;
      cmd_id1      <= '0;
      cmd_id2      <= '0;
      cmd_x        <= '0;
      cmd_y        <= '0;
      cmd_eof      <= 1'b0;
      cmd_overflow <= 1'b0;
    end else begin
      cmd_valid <= in_valid;
      if (in_valid) begin
        next_id      <= (op == OP_NEW) ? cur_next + 1'b1 : cur_next;
        ovf_flag     <= (in_sof ? 1'b0 : ovf_flag) | refuse;
        cmd_op       <= op;
        cmd_id1      <= id1;
        cmd_id2      <= id2;
        cmd_x        <= in_x;
        cmd_y        <= in_y;
        cmd_eof      <= in_eof;
        cmd_overflow <= (in_sof ? 1'b0 : ovf_flag) | refuse;
      end
    end
  end

endmodule
