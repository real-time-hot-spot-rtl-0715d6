// tb_udp_packet_generator: feeds frame headers and hot spot records as the
// clock-crossing FIFO would (records trickling in after their header) and parses
// the byte stream that comes out, with random back-pressure. Checks every
// Ethernet, IPv4 and UDP field, the IPv4 header checksum (recomputed here), the
// payload header and every record, the split into datagrams of HS_PER_PKT
// records, tx_last, and that tx_valid never drops inside a datagram.
module tb_udp_packet_generator;
  import hotspot_pkg::*;
  localparam int unsigned W = 16, H = 8, MAX = 16, PER = 4, FAW = 4;
  localparam int unsigned XW = 4, YW = 3, CNT_W = 8, SX_W = 12, SY_W = 11;
  localparam int unsigned REC_W = 2*XW + SX_W + 2*YW + SY_W + CNT_W, ENT_W = 2 + REC_W;
  localparam logic [47:0] SMAC = 48'h0200_0000_0001, DMAC = 48'h0A0B_0C0D_0E0F;
  localparam logic [31:0] SIP = 32'hC0A8_0002, DIP = 32'hC0A8_0063;

  logic clk = 0, rst_n = 0;
  logic [ENT_W-1:0] fifo_data;
  logic fifo_empty, fifo_rd, tx_valid, tx_last, tx_ready;
  logic [FAW:0] fifo_count;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;

  udp_packet_generator #(.IM_WIDTH(W), .IM_HEIGHT(H), .MAX_HOTSPOTS(MAX), .HS_PER_PKT(PER),
                         .FIFO_AW(FAW)) dut (
    .clk, .rst_n, .src_mac(SMAC), .src_ip(SIP), .src_port(16'd5001),
    .dst_mac(DMAC), .dst_ip(DIP), .dst_port(16'd6000),
    .fifo_data, .fifo_empty, .fifo_count, .fifo_rd, .tx_data, .tx_valid, .tx_last, .tx_ready);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model
  logic [ENT_W-1:0] q [$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : q[0];
  assign fifo_count = (FAW+1)'(q.size());
  always @(posedge clk) if (fifo_rd && q.size() != 0) void'(q.pop_front());

  // expected records of the frame under test
  int ex_mx [$], ex_nx [$], ex_my [$], ex_ny [$], ex_sx [$], ex_sy [$], ex_c [$];

  // received bytes of the current datagram
  byte unsigned pkt [$];
  int n_pkts = 0;
  bit in_pkt = 0;

  function automatic int be16(int o); return (int'(pkt[o]) << 8) | int'(pkt[o+1]); endfunction
  function automatic int be32(int o); return (be16(o) << 16) | be16(o+2); endfunction

  int frame_no, total, pidx, ovf_exp;

  task automatic check_pkt();
    int n, s;
    n = (total - pidx * PER > PER) ? PER : total - pidx * PER;
    checks++;
    if (pkt.size() != 50 + 20 * n) begin
      failures++; $display("datagram %0d length %0d, expected %0d", pidx, pkt.size(), 50 + 20*n);
      return;
    end
    s = 0;
    for (int i = 0; i < 10; i++) s += be16(14 + 2*i);
    s = (s & 16'hFFFF) + (s >> 16); s = (s & 16'hFFFF) + (s >> 16);
    checks++;
    if (be32(0) != int'(DMAC[47:16]) || be16(4) != int'(DMAC[15:0]) ||
        be32(6) != int'(SMAC[47:16]) || be16(10) != int'(SMAC[15:0]) || be16(12) != 16'h0800 ||
        pkt[14] != 8'h45 || be16(16) != 20 + 8 + 8 + 20*n || pkt[23] != 17 || s != 16'hFFFF ||
        be32(26) != int'(SIP) || be32(30) != int'(DIP) || be16(34) != 5001 || be16(36) != 6000 ||
        be16(38) != 8 + 8 + 20*n || be16(40) != 0) begin
      failures++; $display("bad Ethernet/IP/UDP header in datagram %0d (checksum sum %h)", pidx, s);
    end
    checks++;
    if (be16(42) != frame_no || be16(44) != total || pkt[46] != pidx || pkt[47] != n ||
        pkt[48] != ovf_exp) begin
      failures++; $display("bad payload header in datagram %0d", pidx);
    end
    for (int r = 0; r < n; r++) begin
      int o = 50 + 20*r;
      checks++;
      if (be16(o) != ex_mx[0] || be16(o+2) != ex_nx[0] || be16(o+4) != ex_my[0] ||
          be16(o+6) != ex_ny[0] || be32(o+8) != ex_sx[0] || be32(o+12) != ex_sy[0] ||
          be32(o+16) != ex_c[0]) begin
        failures++; $display("bad record %0d in datagram %0d", r, pidx);
      end
      void'(ex_mx.pop_front()); void'(ex_nx.pop_front()); void'(ex_my.pop_front());
      void'(ex_ny.pop_front()); void'(ex_sx.pop_front()); void'(ex_sy.pop_front());
      void'(ex_c.pop_front());
    end
    pidx++;
  endtask

  // byte monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_pkt && !tx_valid) begin
        checks++; failures++; $display("tx_valid dropped inside a datagram");
      end
      if (tx_valid && tx_ready) begin
        pkt.push_back(tx_data);
        in_pkt = !tx_last;
        if (tx_last) begin
          check_pkt();
          n_pkts++;
          pkt.delete();
        end
      end
    end
  end

  always @(negedge clk) tx_ready = ($urandom % 4) != 0;

  initial begin
    tx_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      int exp_pkts;
      frame_no = f * 3 + 1; total = (f * 5) % 14; ovf_exp = f % 2; pidx = 0;
      n_pkts = 0;
      @(negedge clk);
      q.push_back({TAG_HDR, (REC_W-22)'(0), 16'(frame_no), 5'(total), 1'(ovf_exp)});
      for (int r = 0; r < total; r++) begin
        int mx, nx, my, ny, sx, sy, c;
        mx = $urandom % W; nx = $urandom % W; my = $urandom % H; ny = $urandom % H;
        sx = $urandom % 4096; sy = $urandom % 2048; c = $urandom % 256;
        ex_mx.push_back(mx); ex_nx.push_back(nx); ex_my.push_back(my); ex_ny.push_back(ny);
        ex_sx.push_back(sx); ex_sy.push_back(sy); ex_c.push_back(c);
        repeat ($urandom % 20) @(negedge clk);
        wait (q.size() < 15);
        @(negedge clk);
        q.push_back({TAG_REC, XW'(mx), XW'(nx), SX_W'(sx), YW'(my), YW'(ny), SY_W'(sy), CNT_W'(c)});
      end
      exp_pkts = (total == 0) ? 1 : (total + PER - 1) / PER;
      wait (n_pkts == exp_pkts);
      repeat (5) @(posedge clk);
      checks++;
      if (n_pkts != exp_pkts || ex_mx.size() != 0) begin
        failures++; $display("frame %0d: %0d datagrams, expected %0d", f, n_pkts, exp_pkts);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
