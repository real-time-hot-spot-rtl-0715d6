// tb_hotspot_a320: end-to-end test of the hot spot detector sized for a
// 320 x 240 infrared camera (IM_WIDTH = 320, IM_HEIGHT = 240, other parameters
// at their defaults: 256 hot spot ids, 512-entry result FIFO). The processed
// window is the top-left 320 x 240 of each field. Otherwise identical to
// tb_hotspot_full,
// fed with full-size ITU-R BT.656 PAL fields (1728 bytes per line, 22 blanking
// and 288 active lines per field, Cb Y Cr Y samples with EAV/SAV codes).
//
// Three fields are sent: random hot blobs, random blobs after a threshold change
// made by a configuration datagram on the rx stream, and a checkerboard with far
// more hot spots than ids (overflow). The UDP datagrams on the MAC-side stream
// are parsed and compared, frame by frame, with a reference labelling computed
// here by flood fill (4-connected components, ordered by their first pixel in
// raster order): number of hot spots, overflow flag, bounding box, coordinate
// sums and pixel count of each. frame_done must follow the last pixel of a field
// by a fixed number of clocks. The MAC is never stalled, so no frame may be
// dropped. Each mechanism (new / add / unify, overflow, datagram split,
// threshold change, buffer swap) is counted; one that never happened fails.
module tb_hotspot_a320;
  import hotspot_pkg::*;
  localparam int W = 320, H = 240, MAX = 256, PER = 64;
  localparam int ACT_LUMA = 720, ACT_LINES = 288, VBLANK = 22, HBLANK = 280;
  localparam int NFIELDS = 3;
  localparam int LAT = 4;   // clocks from last luma byte to frame_done
  localparam logic [31:0] OWN_IP = 32'hC0A8_0002;   // default source address of the top

  logic pix_clk = 0, mac_clk = 0, pix_rst_n = 0, mac_rst_n = 0;
  logic [7:0] vid_data, tx_data, rx_data;
  logic tx_valid, tx_last, tx_ready, rx_valid, rx_last;
  logic frame_done, hs_overflow;
  logic scl_oe, sda_oe, sda_in, mdc, mdio_o, mdio_oe, cfg_done, cfg_nack;
  // chip configuration buses: SDA reads back what is driven (no target answers)
  assign sda_in = !sda_oe;
  logic [15:0] frames_dropped;
  int checks = 0, failures = 0;

  hotspot_top #(.IM_WIDTH(W), .IM_HEIGHT(H)) dut (.*);

  always #18.5 pix_clk = ~pix_clk;   // 27 MHz
  always #5    mac_clk = ~mac_clk;   // 100 MHz

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  typedef struct { int mx, nx, sx, my, ny, sy, c; } hs_t;
  hs_t exp_hs [NFIELDS][$];
  bit  exp_ovf [NFIELDS];
  bit  got_frame [NFIELDS];

  bit  img [H][W];
  int  lab [H][W];

  function automatic void reference(int f);
    int n; int sx [$], sy [$];
    exp_hs[f].delete();
    foreach (lab[y, x]) lab[y][x] = 0;
    n = 0;
    exp_ovf[f] = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      if (img[y][x] && lab[y][x] == 0) begin
        hs_t h;
        n++;
        if (n > MAX - 1) begin exp_ovf[f] = 1; continue; end
        h = '{mx: x, nx: x, sx: 0, my: y, ny: y, sy: 0, c: 0};
        sx.push_back(x); sy.push_back(y); lab[y][x] = n;
        while (sx.size() != 0) begin
          int cx, cy;
          cx = sx.pop_back(); cy = sy.pop_back();
          h.c++; h.sx += cx; h.sy += cy;
          if (cx > h.mx) h.mx = cx;
          if (cx < h.nx) h.nx = cx;
          if (cy > h.my) h.my = cy;
          if (cy < h.ny) h.ny = cy;
          if (cx > 0     && img[cy][cx-1] && lab[cy][cx-1] == 0) begin lab[cy][cx-1] = n; sx.push_back(cx-1); sy.push_back(cy); end
          if (cx < W - 1 && img[cy][cx+1] && lab[cy][cx+1] == 0) begin lab[cy][cx+1] = n; sx.push_back(cx+1); sy.push_back(cy); end
          if (cy > 0     && img[cy-1][cx] && lab[cy-1][cx] == 0) begin lab[cy-1][cx] = n; sx.push_back(cx); sy.push_back(cy-1); end
          if (cy < H - 1 && img[cy+1][cx] && lab[cy+1][cx] == 0) begin lab[cy+1][cx] = n; sx.push_back(cx); sy.push_back(cy+1); end
        end
        exp_hs[f].push_back(h);
      end
    end
  endfunction

  // ------------------------------------------------------------ video source
  logic [7:0] pixval [H][W];
  int         t_last_pix;   // cycle of the last processed luma byte
  int         cyc = 0;
  always @(posedge pix_clk) cyc <= cyc + 1;

  task automatic send(input logic [7:0] b);
    @(negedge pix_clk); vid_data = b;
  endtask
  task automatic code(input bit f, input bit v, input bit h);
    send(8'hFF); send(8'h00); send(8'h00); send({1'b1, f, v, h, 4'h0});
  endtask
  task automatic vline(input bit f, input bit v, input int ln);
    code(f, v, 1'b1);
    for (int i = 0; i < HBLANK; i++) send((i % 2) ? 8'h10 : 8'h80);
    code(f, v, 1'b0);
    for (int i = 0; i < ACT_LUMA; i++) begin
      send(8'h80);
      send((!v && i < W && ln < H) ? pixval[ln][i] : 8'h20);
      if (!v && i == W - 1 && ln == H - 1) t_last_pix = cyc;
    end
  endtask
  task automatic field(input int f);
    for (int l = 0; l < VBLANK; l++) vline(f[0], 1'b1, 0);
    for (int l = 0; l < ACT_LINES; l++) vline(f[0], 1'b0, l);
  endtask

  // build image f: hot level above the threshold in use, cold below
  task automatic make_image(input int f, input int thr);
    foreach (img[y, x]) img[y][x] = 0;
    if (f == 2) begin
      foreach (img[y, x]) img[y][x] = ((x + y) % 2 == 0);     // 65536 isolated spots, 255 ids
    end else begin
      int nb = 3 + $urandom % 8;
      for (int b = 0; b < nb; b++) begin
        int x0 = $urandom % W, y0 = $urandom % H, bw = 1 + $urandom % 60, bh = 1 + $urandom % 30;
        for (int y = y0; y < y0 + bh && y < H; y++)
          for (int x = x0; x < x0 + bw && x < W; x++) img[y][x] = 1;
      end
      // U shapes: arms open at the top and meet lower down (unification)
      for (int y = 2; y < 8; y++) begin img[y][20] = 1; img[y][24] = 1; end
      for (int x = 20; x <= 24; x++) img[8][x] = 1;
      for (int i = 0; i < 40; i++) img[$urandom % H][$urandom % W] = 1;
    end
    foreach (img[y, x])
      pixval[y][x] = img[y][x] ? 8'(thr + $urandom % (255 - thr)) : 8'(1 + $urandom % (thr - 1));
    reference(f);
  endtask

  // ------------------------------------------------------------ config sender
  task automatic send_threshold(input logic [7:0] t);
    byte unsigned b [$];
    for (int i = 0; i < 12; i++) b.push_back(8'h22);
    b.push_back(8'h08); b.push_back(8'h00);
    b.push_back(8'h45); b.push_back(0); b.push_back(0); b.push_back(33);
    repeat (4) b.push_back(0);
    b.push_back(64); b.push_back(17); b.push_back(0); b.push_back(0);
    repeat (4) b.push_back(8'h0A);
    for (int i = 3; i >= 0; i--) b.push_back(OWN_IP[8*i +: 8]);
    b.push_back(8'h13); b.push_back(8'h88); b.push_back(8'h13); b.push_back(8'h88);
    b.push_back(0); b.push_back(13); b.push_back(0); b.push_back(0);
    b.push_back(8'h00); b.push_back(0); b.push_back(0); b.push_back(0); b.push_back(t);
    foreach (b[i]) begin
      @(negedge mac_clk); rx_valid = 1; rx_data = b[i]; rx_last = (i == b.size() - 1);
    end
    @(negedge mac_clk); rx_valid = 0; rx_last = 0;
  endtask

  // ------------------------------------------------------------ receiver
  byte unsigned pkt [$];
  int n_split = 0, n_pkts = 0, n_records = 0;
  int rec_seen [NFIELDS];

  function automatic int be16(int o); return (int'(pkt[o]) << 8) | int'(pkt[o+1]); endfunction
  function automatic int be32(int o); return (be16(o) << 16) | be16(o+2); endfunction

  function automatic void check_pkt();
    int fno, total, pidx, n, s;
    n_pkts++;
    fno = be16(42); total = be16(44); pidx = pkt[46]; n = pkt[47];
    s = 0;
    for (int i = 0; i < 10; i++) s += be16(14 + 2*i);
    s = (s & 16'hFFFF) + (s >> 16); s = (s & 16'hFFFF) + (s >> 16);
    checks++;
    if (fno >= NFIELDS || pkt.size() != 50 + 20*n || s != 16'hFFFF || be16(12) != 16'h0800) begin
      failures++; $display("malformed datagram (frame %0d, %0d bytes)", fno, pkt.size());
      return;
    end
    if (pidx > 0) n_split++;
    got_frame[fno] = 1;
    checks++;
    if (total != exp_hs[fno].size() || pkt[48] != 8'(exp_ovf[fno])) begin
      failures++;
      $display("frame %0d: %0d hot spots (ovf %0d), expected %0d (ovf %0d)", fno, total, pkt[48],
               exp_hs[fno].size(), exp_ovf[fno]);
      return;
    end
    for (int r = 0; r < n; r++) begin
      int o = 50 + 20*r, k = pidx * PER + r;
      hs_t h;
      h = exp_hs[fno][k];
      checks++; n_records++; rec_seen[fno]++;
      if (be16(o) != h.mx || be16(o+2) != h.nx || be16(o+4) != h.my || be16(o+6) != h.ny ||
          be32(o+8) != h.sx || be32(o+12) != h.sy || be32(o+16) != h.c) begin
        failures++;
        $display("frame %0d hot spot %0d: got x %0d..%0d y %0d..%0d sums %0d,%0d n %0d; expected x %0d..%0d y %0d..%0d sums %0d,%0d n %0d",
                 fno, k, be16(o+2), be16(o), be16(o+6), be16(o+4), be32(o+8), be32(o+12), be32(o+16),
                 h.nx, h.mx, h.ny, h.my, h.sx, h.sy, h.c);
      end
    end
  endfunction

  always @(posedge mac_clk) begin
    if (mac_rst_n && tx_valid && tx_ready) begin
      pkt.push_back(tx_data);
      if (tx_last) begin check_pkt(); pkt.delete(); end
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int n_new = 0, n_add = 0, n_unify = 0, n_ovf = 0, n_done = 0, n_lat_bad = 0;
  always @(posedge pix_clk) begin
    if (dut.cmd_valid) begin
      case (dut.cmd_op)
        OP_NEW:   n_new++;
        OP_ADD:   n_add++;
        OP_UNIFY: n_unify++;
        default:  ;
      endcase
    end
    if (hs_overflow && pix_rst_n) n_ovf++;
    if (frame_done && pix_rst_n) begin
      n_done++;
      checks++;
      if (cyc - t_last_pix != LAT) begin
        failures++; n_lat_bad++;
        $display("frame_done %0d clocks after the last pixel, expected %0d", cyc - t_last_pix, LAT);
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  int thr_now = 200;
  int n_got;
  initial begin
    vid_data = 8'h10; tx_ready = 1; rx_valid = 0; rx_last = 0; rx_data = 0;
    foreach (got_frame[i]) begin got_frame[i] = 0; rec_seen[i] = 0; end
    repeat (3) @(posedge pix_clk);
    pix_rst_n = 1; mac_rst_n = 1;
    for (int f = 0; f < NFIELDS; f++) begin
      if (f == 1) begin
        // new threshold during vertical blanking, before field 1
        send_threshold(8'd90);
        thr_now = 90;
        repeat (10) @(posedge pix_clk);
      end
      make_image(f, thr_now);
      field(f);
    end
    tx_ready = 1;
    for (int l = 0; l < 4; l++) vline(1'b0, 1'b1, 0);
    repeat (40000) @(posedge mac_clk);

    // frames that were not dropped must all have been received, completely
    for (int f = 0; f < NFIELDS; f++) begin
      checks++;
      if (got_frame[f] && rec_seen[f] != exp_hs[f].size()) begin
        failures++; $display("frame %0d: %0d of %0d records", f, rec_seen[f], exp_hs[f].size());
      end
    end
    checks++;
    if (!cfg_done || !cfg_nack) begin
      failures++; $display("chip configuration: done %0d, missing acknowledge seen %0d", cfg_done, cfg_nack);
    end
    n_got = 0;
    foreach (got_frame[f]) n_got += got_frame[f];
    checks++;
    if (int'(frames_dropped) + n_got != NFIELDS) begin
      failures++;
      $display("%0d frames received + %0d dropped != %0d", n_got, frames_dropped, NFIELDS);
    end
    $display("mechanisms: new=%0d add=%0d unify=%0d overflow=%0d dropped=%0d split=%0d swaps=%0d threshold_changed=%0d datagrams=%0d records=%0d",
             n_new, n_add, n_unify, n_ovf, frames_dropped, n_split, n_done, got_frame[1], n_pkts, n_records);
    checks++;
    if (n_new == 0 || n_add == 0 || n_unify == 0 || n_ovf == 0 || frames_dropped != 0 ||
        n_split == 0 || n_done != NFIELDS || !got_frame[1]) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
