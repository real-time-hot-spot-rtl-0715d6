// udp_packet_generator: sends the hot spots of each frame as UDP datagrams.
//
// Runs in the Ethernet MAC clock domain and reads the clock-crossing FIFO filled
// by the result scanner: a header entry per frame followed by one entry per hot
// spot. A frame's hot spots are sent in ceil(n / HS_PER_PKT) datagrams (one
// datagram when there are none), each a complete Ethernet II frame without
// preamble and FCS, which the MAC adds:
//   bytes  0..13  Ethernet: destination MAC, source MAC, type 0x0800
//   bytes 14..33  IPv4: version 4, IHL 5, DF, TTL 64, protocol 17, header checksum
//   bytes 34..41  UDP: ports, length, checksum 0 (no checksum, allowed for IPv4)
//   bytes 42..49  payload header: frame number (2), hot spots in the frame (2),
//                 datagram index (1), records in this datagram (1),
//                 flags (1, bit 0 = id capacity exhausted), 0 (1)
//   then 20 bytes per hot spot: max X, min X, max Y, min Y (2 bytes each),
//                 sum X, sum Y, pixel count (4 bytes each)
// Multi-byte fields are big-endian. The centre of mass of a hot spot is
// sum / count. That the results leave as UDP packets through a FIFO follows the
// design; the packet layout and the splitting are this implementation's choices.
//
// Interface: byte stream tx_data/tx_valid/tx_last with tx_ready back-pressure
// (a byte moves when tx_valid and tx_ready are both high). A datagram starts
// only once all of its records are in the FIFO, so tx_valid never drops inside
// a datagram. Requires FIFO depth >= HS_PER_PKT, XW, YW <= 16 and sum and count
// widths <= 32.
`include "hotspot_defs.svh"

module udp_packet_generator
  import hotspot_pkg::*;
#(
  parameter int unsigned IM_WIDTH     = hotspot_pkg::DEF_IM_WIDTH,
  parameter int unsigned IM_HEIGHT    = hotspot_pkg::DEF_IM_HEIGHT,
  parameter int unsigned MAX_HOTSPOTS = hotspot_pkg::DEF_MAX_HOTSPOTS,
  parameter int unsigned HS_PER_PKT   = 64,
  parameter int unsigned FIFO_AW      = 9,
  localparam int unsigned ID_W  = $clog2(MAX_HOTSPOTS),
  localparam int unsigned XW    = $clog2(IM_WIDTH),
  localparam int unsigned YW    = $clog2(IM_HEIGHT),
  localparam int unsigned CNT_W = $clog2(IM_WIDTH * IM_HEIGHT + 1),
  localparam int unsigned SX_W  = XW + CNT_W,
  localparam int unsigned SY_W  = YW + CNT_W,
  localparam int unsigned REC_W = 2 * XW + SX_W + 2 * YW + SY_W + CNT_W,
  localparam int unsigned ENT_W = 2 + REC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // addresses
  input  logic [47:0]      src_mac,
  input  logic [31:0]      src_ip,
  input  logic [15:0]      src_port,
  input  logic [47:0]      dst_mac,
  input  logic [31:0]      dst_ip,
  input  logic [15:0]      dst_port,
  // read side of the clock-crossing FIFO (first word fall through)
  input  logic [ENT_W-1:0] fifo_data,
  input  logic             fifo_empty,
  input  logic [FIFO_AW:0] fifo_count,
  output logic             fifo_rd,
  // byte stream to the MAC
  output logic [7:0]       tx_data,
  output logic             tx_valid,
  output logic             tx_last,
  input  logic             tx_ready
);

  `HS_REC_TYPEDEF

  localparam int unsigned HDR_BYTES = 50;
  localparam int unsigned REC_BYTES = 20;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_HDR, S_REC} state_e;
  state_e state;

  logic [15:0]   frame_no;
  logic [ID_W:0] total, remaining, n_pkt;
  logic          ovf;
  logic [7:0]    pkt_idx;
  logic [15:0]   ident;
  logic [5:0]    hbyte;       // byte index in the 50-byte header
  logic [4:0]    rbyte;       // byte index in a 20-byte record
  logic [ID_W:0] rcnt;        // records sent in this datagram

  logic [1:0]    head_tag;
  hs_rec_t       head_rec;
  assign head_tag = fifo_data[ENT_W-1 -: 2];
  assign head_rec = hs_rec_t'(fifo_data[REC_W-1:0]);

  // records in the next datagram
  logic [ID_W:0] n_next;
  assign n_next = (remaining > (ID_W+1)'(HS_PER_PKT)) ? (ID_W+1)'(HS_PER_PKT) : remaining;

  // ------------------------------------------------------------ header bytes
  logic [15:0] ip_len, udp_len;
  logic [15:0] ip_words [10];
  logic [15:0] cksum;
  logic [7:0]  hdr [HDR_BYTES];

  always_comb begin
    udp_len = 16'(8 + 8) + 16'(REC_BYTES) * 16'(n_pkt);
    ip_len  = 16'(20) + udp_len;
    ip_words[0] = 16'h4500;
    ip_words[1] = ip_len;
    ip_words[2] = ident;
    ip_words[3] = 16'h4000;
    ip_words[4] = 16'h4011;
    ip_words[5] = 16'h0000;
    ip_words[6] = src_ip[31:16];
    ip_words[7] = src_ip[15:0];
    ip_words[8] = dst_ip[31:16];
    ip_words[9] = dst_ip[15:0];
    cksum = ip_checksum(ip_words);

    for (int i = 0; i < 6; i++) begin
      hdr[i]     = dst_mac[47 - 8*i -: 8];
      hdr[6 + i] = src_mac[47 - 8*i -: 8];
    end
    hdr[12] = 8'h08;            hdr[13] = 8'h00;
    for (int i = 0; i < 10; i++) begin
      hdr[14 + 2*i]     = ip_words[i][15:8];
      hdr[14 + 2*i + 1] = ip_words[i][7:0];
    end
    hdr[24] = cksum[15:8];      hdr[25] = cksum[7:0];
    hdr[34] = src_port[15:8];   hdr[35] = src_port[7:0];
    hdr[36] = dst_port[15:8];   hdr[37] = dst_port[7:0];
    hdr[38] = udp_len[15:8];    hdr[39] = udp_len[7:0];
    hdr[40] = 8'h00;            hdr[41] = 8'h00;
    hdr[42] = frame_no[15:8];   hdr[43] = frame_no[7:0];
    hdr[44] = 8'(16'(total) >> 8); hdr[45] = 8'(total);
    hdr[46] = pkt_idx;          hdr[47] = 8'(n_pkt);
    hdr[48] = {7'd0, ovf};      hdr[49] = 8'h00;
  end

  // ------------------------------------------------------------ record bytes
  logic [7:0] rec [REC_BYTES];
  always_comb begin
    logic [15:0] mx, nx, my, ny;
    logic [31:0] sx, sy, c;
    mx = 16'(head_rec.max_x);  nx = 16'(head_rec.min_x);
    my = 16'(head_rec.max_y);  ny = 16'(head_rec.min_y);
    sx = 32'(head_rec.sum_x);  sy = 32'(head_rec.sum_y);
    c  = 32'(head_rec.cnt);
    rec[0] = mx[15:8];  rec[1] = mx[7:0];
    rec[2] = nx[15:8];  rec[3] = nx[7:0];
    rec[4] = my[15:8];  rec[5] = my[7:0];
    rec[6] = ny[15:8];  rec[7] = ny[7:0];
    for (int i = 0; i < 4; i++) begin
      rec[8 + i]  = sx[31 - 8*i -: 8];
      rec[12 + i] = sy[31 - 8*i -: 8];
      rec[16 + i] = c[31 - 8*i -: 8];
    end
  end

  // ------------------------------------------------------------ output mux
  always_comb begin
    tx_valid = 1'b0;
    tx_data  = 8'h00;
    tx_last  = 1'b0;
    fifo_rd  = 1'b0;
    case (state)
      S_IDLE: fifo_rd = !fifo_empty;   // pops the header (or discards a stray record)
      S_HDR: begin
        tx_valid = 1'b1;
        tx_data  = hdr[hbyte];
        tx_last  = (hbyte == 6'(HDR_BYTES - 1)) && (n_pkt == '0);
      end
      S_REC: begin
        tx_valid = !fifo_empty;
        tx_data  = rec[rbyte];
        tx_last  = (rbyte == 5'(REC_BYTES - 1)) && (rcnt == n_pkt - 1'b1);
        fifo_rd  = tx_ready && !fifo_empty && (rbyte == 5'(REC_BYTES - 1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      frame_no  <= '0;
      total     <= '0;
      remaining <= '0;
      n_pkt     <= '0;
      ovf       <= 1'b0;
      pkt_idx   <= '0;
      ident     <= '0;
      hbyte     <= '0;
      rbyte     <= '0;
      rcnt      <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (!fifo_empty && head_tag == TAG_HDR) begin
            // header entry: {frame_no, count, overflow}; popped here
            {frame_no, total, ovf} <= fifo_data[ID_W+17:0];
            remaining <= fifo_data[ID_W+1:1];
            pkt_idx   <= '0;
            state     <= S_WAIT;
          end
        end
        S_WAIT: begin
          // start a datagram once all its records are queued
          if (fifo_count >= (FIFO_AW+1)'(n_next)) begin
            n_pkt     <= n_next;
            remaining <= remaining - n_next;
            hbyte     <= '0;
            state     <= S_HDR;
          end
        end
        S_HDR: begin
          if (tx_ready) begin
            if (hbyte == 6'(HDR_BYTES - 1)) begin
              rbyte <= '0;
              rcnt  <= '0;
              if (n_pkt == '0) begin
                ident   <= ident + 1'b1;
                state   <= S_IDLE;
              end else begin
                state   <= S_REC;
              end
            end else begin
              hbyte <= hbyte + 1'b1;
            end
          end
        end
        S_REC: begin
          if (tx_ready && !fifo_empty) begin
            if (rbyte == 5'(REC_BYTES - 1)) begin
              rbyte <= '0;
              if (rcnt == n_pkt - 1'b1) begin
                ident   <= ident + 1'b1;
                pkt_idx <= pkt_idx + 1'b1;
                state   <= (remaining == '0) ? S_IDLE : S_WAIT;
              end
              rcnt <= rcnt + 1'b1;
            end else begin
              rbyte <= rbyte + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
