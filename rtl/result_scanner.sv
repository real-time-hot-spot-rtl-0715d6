// result_scanner: reads the final results of the previous frame out of the
// double buffer and queues them for transmission.
//
// When the hot spot memory reports a completed frame (prev_ready) the scanner
// checks that the clock-crossing FIFO has room for the whole frame: a header
// entry plus one entry per valid hot spot. If so it queues the header (frame
// number, number of hot spots, overflow flag) and then walks ids 1 .. MAX-1 of
// the previous bank, queueing every valid record; this takes MAX_HOTSPOTS + 1
// clocks, far less than one frame, so the bank is never overwritten during the
// walk. If the FIFO lacks room the frame's results are skipped and counted in
// frames_dropped. The frame number counts every completed frame.
// This block is this implementation's glue between the double buffer and the
// packet generator; the design only states that the previous frame's results are
// sent while the current one is processed.
//
// Timing: the memory's previous-side read has one clock latency, so the address
// runs one clock ahead of the push. FIFO entries are {tag, payload}; a header
// payload holds {frame_no[15:0], count, overflow} in its low bits.
module result_scanner
  import hotspot_pkg::*;
#(
  parameter int unsigned MAX_HOTSPOTS = hotspot_pkg::DEF_MAX_HOTSPOTS,
  parameter int unsigned REC_W        = 105,
  parameter int unsigned FIFO_AW      = 9,
  localparam int unsigned ID_W  = $clog2(MAX_HOTSPOTS),
  localparam int unsigned ENT_W = 2 + REC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // previous-frame side of the hot spot memory
  input  logic             prev_ready,
  input  logic [ID_W:0]    prev_count,
  input  logic             prev_overflow,
  output logic [ID_W-1:0]  prev_addr,
  input  logic [REC_W-1:0] prev_data,
  input  logic             prev_valid,
  // write side of the clock-crossing FIFO
  output logic             fifo_wr,
  output logic [ENT_W-1:0] fifo_data,
  input  logic [FIFO_AW:0] fifo_free,
  // status
  output logic [15:0]      frames_dropped
);

  logic            busy;
  logic            rd_pending;   // a read was issued last clock
  logic [ID_W:0]   addr;
  logic [15:0]     frame_no;

  assign prev_addr = addr[ID_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy           <= 1'b0;
      rd_pending     <= 1'b0;
      addr           <= '0;
      frame_no       <= '0;
      frames_dropped <= '0;
      fifo_wr        <= 1'b0;
      fifo_data      <= '0;
    end else begin
      fifo_wr    <= 1'b0;
      rd_pending <= 1'b0;
      if (prev_ready && !busy) begin
        frame_no <= frame_no + 1'b1;
        if ((FIFO_AW+1)'(prev_count) + 1'b1 <= fifo_free) begin
          busy       <= 1'b1;
          addr       <= (ID_W+1)'(1);
          fifo_wr    <= 1'b1;
          fifo_data  <= '0;
          fifo_data[ENT_W-1 -: 2]    <= TAG_HDR;
          fifo_data[ID_W+17:0]       <= {frame_no, prev_count, prev_overflow};
        end else begin
          frames_dropped <= frames_dropped + 1'b1;
        end
      end else if (busy) begin
        // issue reads for ids 1 .. MAX-1, push valid ones a clock later
        if (addr < (ID_W+1)'(MAX_HOTSPOTS)) begin
          addr       <= addr + 1'b1;
          rd_pending <= 1'b1;
        end else if (!rd_pending) begin
          busy <= 1'b0;
        end
        if (rd_pending && prev_valid) begin
          fifo_wr   <= 1'b1;
          fifo_data <= {TAG_REC, prev_data};
        end
      end
    end
  end

endmodule
