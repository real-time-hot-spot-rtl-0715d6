// tb_app_config: sends configuration datagrams to the receive stream and checks
// that each register write lands in the right setting, that the threshold
// update strobe pulses once per threshold write, and that frames to another IP
// address, another UDP port, another protocol or EtherType change nothing. Ends with random
// frames checked against a reference copy of the registers.
module tb_app_config;
  localparam logic [31:0] OWN_IP = 32'hC0A8_0002;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data, threshold;
  logic rx_valid, rx_last, thr_upd;
  logic [31:0] dst_ip;
  logic [15:0] dst_port;
  logic [47:0] dst_mac;
  int checks = 0, failures = 0, n_upd = 0;

  app_config #(.CFG_PORT(16'd5000)) dut (.clk, .rst_n, .own_ip(OWN_IP), .rx_data, .rx_valid,
    .rx_last, .threshold, .thr_upd, .dst_ip, .dst_port, .dst_mac);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && thr_upd) n_upd++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { byte unsigned a; int unsigned v; } wr_t;

  task automatic send_frame(input logic [31:0] ip, input logic [15:0] port,
                            input logic [15:0] etype, input byte unsigned proto,
                            input wr_t w [$]);
    byte unsigned b [$];
    for (int i = 0; i < 6; i++) b.push_back(8'hFF);
    for (int i = 0; i < 6; i++) b.push_back(8'h10 + i);
    b.push_back(etype[15:8]); b.push_back(etype[7:0]);
    b.push_back(8'h45); b.push_back(0); b.push_back(0); b.push_back(8'd28 + 8'(5 * w.size()));
    b.push_back(0); b.push_back(0); b.push_back(0); b.push_back(0);
    b.push_back(64); b.push_back(proto); b.push_back(0); b.push_back(0);
    b.push_back(192); b.push_back(168); b.push_back(0); b.push_back(99);
    for (int i = 3; i >= 0; i--) b.push_back(ip[8*i +: 8]);
    b.push_back(8'h13); b.push_back(8'h88);
    b.push_back(port[15:8]); b.push_back(port[7:0]);
    b.push_back(0); b.push_back(8'd8 + 8'(5 * w.size())); b.push_back(0); b.push_back(0);
    foreach (w[k]) begin
      b.push_back(w[k].a);
      for (int i = 3; i >= 0; i--) b.push_back(w[k].v[8*i +: 8]);
    end
    foreach (b[i]) begin
      while ($urandom % 3 == 0) begin   // idle clocks inside the frame
        @(negedge clk); rx_valid = 0;
      end
      @(negedge clk);
      rx_valid = 1; rx_data = b[i]; rx_last = (i == b.size() - 1);
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_regs(input logic [7:0] t, input logic [31:0] ip, input logic [15:0] p,
                             input logic [47:0] m, input string what);
    checks++;
    if (threshold != t || dst_ip != ip || dst_port != p || dst_mac != m) begin
      failures++;
      $display("%s: thr=%0d ip=%h port=%0d mac=%h", what, threshold, dst_ip, dst_port, dst_mac);
    end
  endtask

  initial begin
    wr_t w [$];
    rx_valid = 0; rx_last = 0; rx_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_regs(8'd200, 32'hC0A8_0001, 16'd5001, 48'hFFFF_FFFF_FFFF, "reset values");
    w = '{'{8'h00, 32'd123}, '{8'h01, 32'h0A00_0005}, '{8'h02, 32'd7000},
          '{8'h03, 32'h0000_1122}, '{8'h04, 32'h3344_5566}, '{8'h09, 32'hFFFF_FFFF}};
    send_frame(OWN_IP, 16'd5000, 16'h0800, 17, w);
    expect_regs(8'd123, 32'h0A00_0005, 16'd7000, 48'h1122_3344_5566, "after write");
    checks++;
    if (n_upd != 1) begin failures++; $display("threshold strobe count %0d", n_upd); end
    w = '{'{8'h00, 32'd50}};
    send_frame(OWN_IP, 16'd5001, 16'h0800, 17, w);
    send_frame(32'hC0A8_0003, 16'd5000, 16'h0800, 17, w);
    send_frame(OWN_IP, 16'd5000, 16'h0806, 17, w);
    send_frame(OWN_IP, 16'd5000, 16'h0800, 6, w);
    expect_regs(8'd123, 32'h0A00_0005, 16'd7000, 48'h1122_3344_5566, "foreign frames");
    w = '{'{8'h00, 32'd77}, '{8'h02, 32'd80}};
    send_frame(OWN_IP, 16'd5000, 16'h0800, 17, w);
    expect_regs(8'd77, 32'h0A00_0005, 16'd80, 48'h1122_3344_5566, "second write");
    checks++;
    if (n_upd != 2) begin failures++; $display("threshold strobe count %0d", n_upd); end
    // random frames against a reference copy of the registers
    begin
      logic [7:0] t = 8'd77; logic [31:0] ip = 32'h0A00_0005; logic [15:0] p = 16'd80;
      logic [47:0] m = 48'h1122_3344_5566;
      int exp_upd = 2;
      bit ours;
      for (int f = 0; f < 60; f++) begin
        w.delete();
        repeat (1 + $urandom % 4) begin
          wr_t x;
          x.a = byte'($urandom % 6); x.v = $urandom;
          w.push_back(x);
        end
        ours = ($urandom % 4 != 0);
        if (ours) begin
          send_frame(OWN_IP, 16'd5000, 16'h0800, 17, w);
          foreach (w[k])
            case (w[k].a)
              8'h00: begin t = w[k].v[7:0]; exp_upd++; end
              8'h01: ip = w[k].v;
              8'h02: p = w[k].v[15:0];
              8'h03: m[47:32] = w[k].v[15:0];
              8'h04: m[31:0] = w[k].v;
              default: ;
            endcase
        end else begin
          case ($urandom % 3)
            0: send_frame(OWN_IP ^ 32'h100, 16'd5000, 16'h0800, 17, w);
            1: send_frame(OWN_IP, 16'd5000 + 16'(1 + $urandom % 100), 16'h0800, 17, w);
            default: send_frame(OWN_IP, 16'd5000, 16'h0800, 6, w);
          endcase
        end
        expect_regs(t, ip, p, m, $sformatf("random frame %0d", f));
        checks++;
        if (n_upd != exp_upd) begin failures++; $display("frame %0d: %0d threshold strobes, expected %0d", f, n_upd, exp_upd); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
