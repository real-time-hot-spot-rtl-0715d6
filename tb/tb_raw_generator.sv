// tb_raw_generator: builds a BT.656 byte stream (vertical blanking lines, then
// active lines of Cb Y Cr Y samples framed by EAV/SAV codes) with random luma
// values, for several fields, and checks that exactly the IM_WIDTH x IM_HEIGHT
// window of luma samples comes out, in raster order, with the right coordinates,
// values and first/last-pixel flags.
module tb_raw_generator;
  localparam int unsigned W = 8, H = 4;
  localparam int unsigned ACT_LUMA = 12, ACT_LINES = 6, VBLANK = 3, HBLANK = 8;

  logic clk = 0, rst_n = 0;
  logic [7:0] vid_data, pix_data;
  logic pix_valid, pix_sof, pix_eof;
  logic [2:0] pix_x;
  logic [1:0] pix_y;
  int checks = 0, failures = 0;

  raw_generator #(.IM_WIDTH(W), .IM_HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pixels, in order
  logic [7:0] exp_val [$];
  int         exp_x [$], exp_y [$];

  task automatic send(input logic [7:0] b);
    @(negedge clk); vid_data = b;
  endtask

  task automatic code(input bit f, input bit v, input bit h);
    send(8'hFF); send(8'h00); send(8'h00); send({1'b1, f, v, h, 4'h0});
  endtask

  task automatic line(input bit f, input bit v, input int ln);
    code(f, v, 1'b1);                       // EAV
    for (int i = 0; i < HBLANK; i++) send((i % 2) ? 8'h10 : 8'h80);
    code(f, v, 1'b0);                       // SAV
    for (int i = 0; i < ACT_LUMA; i++) begin
      logic [7:0] yv;
      yv = 8'(1 + $urandom % 254);          // 00 and FF are reserved in BT.656
      send(8'h80);                          // Cb or Cr
      send(yv);
      if (!v && i < W && ln < H) begin
        exp_val.push_back(yv); exp_x.push_back(i); exp_y.push_back(ln);
      end
    end
  endtask

  // output monitor
  initial begin
    forever begin
      @(posedge clk); #1;
      if (pix_valid) begin
        checks++;
        if (exp_val.size() == 0) begin
          failures++; $display("unexpected pixel");
        end else begin
          logic [7:0] v; int x, y;
          v = exp_val.pop_front(); x = exp_x.pop_front(); y = exp_y.pop_front();
          if (pix_data != v || int'(pix_x) != x || int'(pix_y) != y ||
              pix_sof != (x == 0 && y == 0) || pix_eof != (x == W-1 && y == H-1)) begin
            failures++;
            $display("pixel mismatch exp (%0d,%0d)=%0d got (%0d,%0d)=%0d", x, y, v, pix_x, pix_y, pix_data);
          end
        end
      end
    end
  end

  initial begin
    vid_data = 8'h10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fld = 0; fld < 4; fld++) begin
      for (int l = 0; l < VBLANK; l++) line(fld[0], 1'b1, 0);
      for (int l = 0; l < ACT_LINES; l++) line(fld[0], 1'b0, l);
    end
    for (int l = 0; l < 2; l++) line(1'b0, 1'b1, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_val.size() != 0) begin
      failures++; $display("%0d pixels missing", exp_val.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
