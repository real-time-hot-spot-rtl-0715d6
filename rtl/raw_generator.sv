// raw_generator: extracts the raw temperature pixels from the digitised video.
//
// The video digitiser delivers ITU-R BT.656 (YUV 4:2:2) at the 27 MHz pixel
// clock: per line an EAV code, blanking, an SAV code and 1440 samples
// Cb Y Cr Y ... A code is the sequence FF 00 00 XY with XY = {1, F, V, H, ...};
// H=1 marks EAV, H=0 SAV, V=1 vertical blanking. The infrared camera is
// monochrome, so the luma samples carry the temperature. Every field (the even
// and the odd half image) is treated as one frame: the first IM_HEIGHT active
// lines of a field and the first IM_WIDTH luma samples of each of them are
// delivered as pixels with their coordinates, in raster order.
//
// That the stream is BT.656 at 27 MHz, that both half images are processed as
// frames and the 512 x 256 frame size follow the design; taking the luma sample
// as the temperature, the top-left alignment of the window and the code
// parser itself are this implementation's choices. IM_WIDTH must not exceed
// 720 and IM_HEIGHT must not exceed the active lines of a field.
//
// Timing: one pixel every second clock at most (pix_valid is a clock enable),
// registered, two clocks after its luma byte entered vid_data. pix_sof and
// pix_eof flag the first and last pixel of a frame.
module raw_generator
  import hotspot_pkg::*;
#(
  parameter int unsigned IM_WIDTH  = hotspot_pkg::DEF_IM_WIDTH,
  parameter int unsigned IM_HEIGHT = hotspot_pkg::DEF_IM_HEIGHT,
  localparam int unsigned XW = $clog2(IM_WIDTH),
  localparam int unsigned YW = $clog2(IM_HEIGHT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       vid_data,   // BT.656 byte stream
  output logic             pix_valid,
  output logic [PIX_W-1:0] pix_data,
  output logic [XW-1:0]    pix_x,
  output logic [YW-1:0]    pix_y,
  output logic             pix_sof,
  output logic             pix_eof
);

  logic [23:0] hist;         // last three bytes
  logic        active;       // inside the samples of an active line
  logic [10:0] smp;          // sample index inside the active line
  logic [9:0]  line;         // active line index inside the field
  logic        trs;          // vid_data is the XY byte of a timing code

  assign trs = (hist == 24'hFF_00_00);

  logic        take;
  logic [9:0]  lum_idx;
  always_comb begin
    lum_idx = smp[10:1];
    take    = active && !trs && smp[0] &&
              (lum_idx < 10'(IM_WIDTH)) && (line < 10'(IM_HEIGHT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      active    <= 1'b0;
      smp       <= '0;
      line      <= '0;
      pix_valid <= 1'b0;
      pix_data  <= '0;
      pix_x     <= '0;
      pix_y     <= '0;
      pix_sof   <= 1'b0;
      pix_eof   <= 1'b0;
    end else begin
      hist      <= {hist[15:0], vid_data};
      pix_valid <= take;
      if (take) begin
        pix_data <= vid_data;
        pix_x    <= XW'(lum_idx);
        pix_y    <= YW'(line);
        pix_sof  <= (lum_idx == 10'd0) && (line == 10'd0);
        pix_eof  <= (lum_idx == 10'(IM_WIDTH - 1)) && (line == 10'(IM_HEIGHT - 1));
      end
      if (trs) begin
        if (vid_data[5]) begin           // vertical blanking: next field starts at line 0
          active <= 1'b0;
          line   <= '0;
        end else if (!vid_data[4]) begin // SAV of an active line
          active <= 1'b1;
          smp    <= '0;
        end else begin                   // EAV of an active line
          if (active) line <= line + 1'b1;
          active <= 1'b0;
        end
      end else if (active) begin
        smp <= smp + 1'b1;
      end
    end
  end

endmodule
