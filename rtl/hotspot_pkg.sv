// hotspot_pkg: shared sizes, types and helpers of the hot spot detector.
//
// The detector labels connected hot regions of an infrared frame on the fly, one
// pixel per pixel-clock enable, and keeps for every region a record of its bounding
// box, coordinate sums (for the centre of mass) and pixel count. The default frame
// size (512 x 256) and hot spot capacity (256) are the evaluated configuration of
// the design; the field widths below are derived from them.
//
// Hot spot ids are log2(MAX_HOTSPOTS) bits wide. Id 0 is reserved to mean "this
// pixel is cold", so MAX_HOTSPOTS-1 hot spots can be labelled per frame. Sums are
// kept wide enough never to overflow: a sum of X over a whole frame needs
// XW + CNT_W bits.
package hotspot_pkg;

  // Evaluated configuration
  localparam int unsigned DEF_IM_WIDTH     = 512;
  localparam int unsigned DEF_IM_HEIGHT    = 256;
  localparam int unsigned DEF_MAX_HOTSPOTS = 256;
  localparam int unsigned PIX_W        = 8;     // luma sample width of ITU-R BT.656

  // Operation requested by the raw processing stage from the reconstructor
  typedef enum logic [1:0] {
    OP_NONE  = 2'd0,   // cold pixel, or new hot spot refused (capacity exhausted)
    OP_NEW   = 2'd1,   // pixel starts hot spot id1
    OP_ADD   = 2'd2,   // pixel joins hot spot id1
    OP_UNIFY = 2'd3    // pixel joins id1 and hot spot id2 is merged into id1
  } hs_op_e;

  // FIFO entry kinds carried from the pixel domain to the packet generator
  typedef enum logic [1:0] {
    TAG_HDR = 2'd1,    // frame header: frame number, hot spot count, overflow flag
    TAG_REC = 2'd2     // one hot spot record
  } fifo_tag_e;

  // Internet one's complement checksum of an IPv4 header given as ten 16-bit words
  function automatic logic [15:0] ip_checksum(input logic [15:0] w [10]);
    logic [19:0] s;
    s = '0;
    for (int i = 0; i < 10; i++) s += 20'(w[i]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    return ~s[15:0];
  endfunction

endpackage
