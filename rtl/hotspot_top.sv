// hotspot_top: real-time hot spot detector, from digitised infrared video to
// UDP datagrams.
//
// Pixel clock domain (pix_clk, the 27 MHz clock of the video digitiser):
//   raw_generator -> classifier -> raw_processing -> hotspot_reconstructor
//   -> hotspot_memory (double buffer) -> result_scanner -> cdc_fifo
// MAC clock domain (mac_clk): cdc_fifo -> udp_packet_generator -> tx stream,
// and rx stream -> app_config, whose threshold crosses back through cfg_sync.
// Also in the MAC clock domain, because the pixel clock only exists once the
// digitiser runs: digitizer_config (I2C to the SAA7113) and phy_config (MDIO to
// the Ethernet physical-layer chip), both started by reset. Their clock
// dividers assume a 25 MHz mac_clk (I2C about 99 kHz, MDC 1.25 MHz).
// Every pixel is labelled and folded into its hot spot record in the clock it
// leaves the classifier, so a frame's results are complete one pixel clock after
// its last pixel; they are transmitted while the next frame is segmented.
//
// The chain of blocks follows the design's block diagram. The Ethernet MAC, the
// physical-layer chip and the video digitiser itself are outside this module: the
// MAC connects to the tx_* / rx_* byte streams, the digitiser to vid_data. The
// source addresses are parameters; destination and threshold come from
// app_config.
//
// Status outputs: cfg_done when both chips are configured (cfg_nack if the
// digitiser failed to acknowledge), frame_done pulses when a frame's results are final,
// hs_overflow is high with it when the frame had more hot spots than ids,
// frames_dropped counts frames whose results found no room in the FIFO.
module hotspot_top
  import hotspot_pkg::*;
#(
  parameter int unsigned IM_WIDTH     = hotspot_pkg::DEF_IM_WIDTH,
  parameter int unsigned IM_HEIGHT    = hotspot_pkg::DEF_IM_HEIGHT,
  parameter int unsigned MAX_HOTSPOTS = hotspot_pkg::DEF_MAX_HOTSPOTS,
  parameter int unsigned FIFO_DEPTH   = 512,
  parameter int unsigned HS_PER_PKT   = 64,
  parameter logic [47:0] SRC_MAC      = 48'h02_00_00_00_00_01,
  parameter logic [31:0] SRC_IP       = 32'hC0A8_0002,
  parameter logic [15:0] SRC_PORT     = 16'd5001,
  parameter logic [15:0] CFG_PORT     = 16'd5000,
  parameter logic [7:0]  RST_THRESH   = 8'd200,
  parameter int unsigned DIG_CLK_DIV  = 63,
  parameter int unsigned PHY_CLK_DIV  = 10
) (
  // video digitiser, pixel clock domain
  input  logic        pix_clk,
  input  logic        pix_rst_n,
  input  logic [7:0]  vid_data,
  // Ethernet MAC client, MAC clock domain
  input  logic        mac_clk,
  input  logic        mac_rst_n,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  // configuration buses of the board's chips (open drain / MDIO), MAC clock domain
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_in,
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe,
  output logic        cfg_done,
  output logic        cfg_nack,
  // status
  output logic        frame_done,
  output logic        hs_overflow,
  output logic [15:0] frames_dropped
);

  localparam int unsigned ID_W    = $clog2(MAX_HOTSPOTS);
  localparam int unsigned XW      = $clog2(IM_WIDTH);
  localparam int unsigned YW      = $clog2(IM_HEIGHT);
  localparam int unsigned CNT_W   = $clog2(IM_WIDTH * IM_HEIGHT + 1);
  localparam int unsigned REC_W   = 2 * XW + (XW + CNT_W) + 2 * YW + (YW + CNT_W) + CNT_W;
  localparam int unsigned ENT_W   = 2 + REC_W;
  localparam int unsigned FIFO_AW = $clog2(FIFO_DEPTH);

  // ------------------------------------------------------------ pixel domain
  logic             raw_valid, raw_sof, raw_eof;
  logic [PIX_W-1:0] raw_data;
  logic [XW-1:0]    raw_x;
  logic [YW-1:0]    raw_y;

  raw_generator #(.IM_WIDTH(IM_WIDTH), .IM_HEIGHT(IM_HEIGHT)) u_raw_gen (
    .clk(pix_clk), .rst_n(pix_rst_n), .vid_data(vid_data),
    .pix_valid(raw_valid), .pix_data(raw_data), .pix_x(raw_x), .pix_y(raw_y),
    .pix_sof(raw_sof), .pix_eof(raw_eof)
  );

  logic [PIX_W-1:0] threshold_pix;
  logic             cls_valid, cls_hot, cls_sof, cls_eof;
  logic [XW-1:0]    cls_x;
  logic [YW-1:0]    cls_y;

  classifier #(.IM_WIDTH(IM_WIDTH), .IM_HEIGHT(IM_HEIGHT)) u_cls (
    .clk(pix_clk), .rst_n(pix_rst_n), .threshold(threshold_pix),
    .in_valid(raw_valid), .in_data(raw_data), .in_x(raw_x), .in_y(raw_y),
    .in_sof(raw_sof), .in_eof(raw_eof),
    .out_valid(cls_valid), .out_hot(cls_hot), .out_x(cls_x), .out_y(cls_y),
    .out_sof(cls_sof), .out_eof(cls_eof)
  );

  logic            cmd_valid, cmd_eof, cmd_overflow;
  hs_op_e          cmd_op;
  logic [ID_W-1:0] cmd_id1, cmd_id2;
  logic [XW-1:0]   cmd_x;
  logic [YW-1:0]   cmd_y;

  raw_processing #(.IM_WIDTH(IM_WIDTH), .IM_HEIGHT(IM_HEIGHT), .MAX_HOTSPOTS(MAX_HOTSPOTS)) u_raw_proc (
    .clk(pix_clk), .rst_n(pix_rst_n),
    .in_valid(cls_valid), .in_hot(cls_hot), .in_x(cls_x), .in_y(cls_y),
    .in_sof(cls_sof), .in_eof(cls_eof),
    .cmd_valid(cmd_valid), .cmd_op(cmd_op), .cmd_id1(cmd_id1), .cmd_id2(cmd_id2),
    .cmd_x(cmd_x), .cmd_y(cmd_y), .cmd_eof(cmd_eof),
    .cmd_overflow(cmd_overflow)
  );

  logic [ID_W-1:0]  rd1_addr, rd2_addr, wr_addr, kill_addr, prev_addr;
  logic [REC_W-1:0] rd1_data, rd2_data, wr_data, prev_data;
  logic             wr_en, wr_new, kill_en, prev_valid, prev_overflow, prev_ready;
  logic [ID_W:0]    prev_count;

  hotspot_reconstructor #(.IM_WIDTH(IM_WIDTH), .IM_HEIGHT(IM_HEIGHT), .MAX_HOTSPOTS(MAX_HOTSPOTS)) u_recon (
    .cmd_valid(cmd_valid), .cmd_op(cmd_op), .cmd_id1(cmd_id1), .cmd_id2(cmd_id2),
    .cmd_x(cmd_x), .cmd_y(cmd_y),
    .rd1_addr(rd1_addr), .rd1_data(rd1_data), .rd2_addr(rd2_addr), .rd2_data(rd2_data),
    .wr_en(wr_en), .wr_new(wr_new), .wr_addr(wr_addr), .wr_data(wr_data),
    .kill_en(kill_en), .kill_addr(kill_addr)
  );

  hotspot_memory #(.IM_WIDTH(IM_WIDTH), .IM_HEIGHT(IM_HEIGHT), .MAX_HOTSPOTS(MAX_HOTSPOTS)) u_mem (
    .clk(pix_clk), .rst_n(pix_rst_n),
    .rd1_addr(rd1_addr), .rd1_data(rd1_data), .rd2_addr(rd2_addr), .rd2_data(rd2_data),
    .wr_en(wr_en), .wr_new(wr_new), .wr_addr(wr_addr), .wr_data(wr_data),
    .kill_en(kill_en), .kill_addr(kill_addr),
    .swap(cmd_valid && cmd_eof), .swap_overflow(cmd_overflow),
    .prev_addr(prev_addr), .prev_data(prev_data), .prev_valid(prev_valid),
    .prev_count(prev_count), .prev_overflow(prev_overflow), .prev_ready(prev_ready)
  );

  assign frame_done  = prev_ready;
  assign hs_overflow = prev_ready && prev_overflow;

  logic               fifo_wr, fifo_rd, fifo_empty;
  logic [ENT_W-1:0]   fifo_wdata, fifo_rdata;
  logic [FIFO_AW:0]   fifo_free, fifo_count;

  result_scanner #(.MAX_HOTSPOTS(MAX_HOTSPOTS), .REC_W(REC_W), .FIFO_AW(FIFO_AW)) u_scan (
    .clk(pix_clk), .rst_n(pix_rst_n),
    .prev_ready(prev_ready), .prev_count(prev_count), .prev_overflow(prev_overflow),
    .prev_addr(prev_addr), .prev_data(prev_data), .prev_valid(prev_valid),
    .fifo_wr(fifo_wr), .fifo_data(fifo_wdata), .fifo_free(fifo_free),
    .frames_dropped(frames_dropped)
  );

  cdc_fifo #(.WIDTH(ENT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(pix_clk), .wr_rst_n(pix_rst_n), .wr_en(fifo_wr), .wr_data(fifo_wdata),
    .wr_full(), .wr_free(fifo_free),
    .rd_clk(mac_clk), .rd_rst_n(mac_rst_n), .rd_en(fifo_rd), .rd_data(fifo_rdata),
    .rd_empty(fifo_empty), .rd_count(fifo_count)
  );

  // ------------------------------------------------------------ MAC domain
  logic [7:0]  threshold_mac;
  logic        thr_upd;
  logic [31:0] dst_ip;
  logic [15:0] dst_port;
  logic [47:0] dst_mac;

  app_config #(.CFG_PORT(CFG_PORT), .RST_THRESH(RST_THRESH)) u_cfg (
    .clk(mac_clk), .rst_n(mac_rst_n), .own_ip(SRC_IP),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_last(rx_last),
    .threshold(threshold_mac), .thr_upd(thr_upd),
    .dst_ip(dst_ip), .dst_port(dst_port), .dst_mac(dst_mac)
  );

  cfg_sync #(.W(PIX_W), .RST_VALUE(RST_THRESH)) u_thr_sync (
    .src_clk(mac_clk), .src_rst_n(mac_rst_n), .src_upd(thr_upd), .src_data(threshold_mac),
    .dst_clk(pix_clk), .dst_rst_n(pix_rst_n), .dst_data(threshold_pix)
  );

  udp_packet_generator #(.IM_WIDTH(IM_WIDTH), .IM_HEIGHT(IM_HEIGHT), .MAX_HOTSPOTS(MAX_HOTSPOTS),
                         .HS_PER_PKT(HS_PER_PKT), .FIFO_AW(FIFO_AW)) u_udp (
    .clk(mac_clk), .rst_n(mac_rst_n),
    .src_mac(SRC_MAC), .src_ip(SRC_IP), .src_port(SRC_PORT),
    .dst_mac(dst_mac), .dst_ip(dst_ip), .dst_port(dst_port),
    .fifo_data(fifo_rdata), .fifo_empty(fifo_empty), .fifo_count(fifo_count), .fifo_rd(fifo_rd),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_last(tx_last), .tx_ready(tx_ready)
  );

  logic dig_done, phy_done;

  digitizer_config #(.CLK_DIV(DIG_CLK_DIV)) u_dig_cfg (
    .clk(mac_clk), .rst_n(mac_rst_n), .scl_oe(scl_oe), .sda_oe(sda_oe), .sda_in(sda_in),
    .done(dig_done), .nack_err(cfg_nack)
  );

  phy_config #(.CLK_DIV(PHY_CLK_DIV)) u_phy_cfg (
    .clk(mac_clk), .rst_n(mac_rst_n), .mdc(mdc), .mdio_o(mdio_o), .mdio_oe(mdio_oe),
    .done(phy_done)
  );

  assign cfg_done = dig_done && phy_done;

endmodule
