// tb_hotspot_reconstructor: random commands and random stored records. The
// written record must equal the merge of the pixel with record id1 (unless the
// pixel opens a new hot spot) and, on unification, with record id2, computed
// here field by field with plain integers. Write and invalidate strobes and
// addresses are checked too.
module tb_hotspot_reconstructor;
  import hotspot_pkg::*;
  localparam int unsigned W = 16, H = 8, MAX = 8;
  localparam int unsigned ID_W = 3, XW = 4, YW = 3, CNT_W = 8, SX_W = 12, SY_W = 11;
  localparam int unsigned REC_W = 2*XW + SX_W + 2*YW + SY_W + CNT_W;

  logic cmd_valid;
  hs_op_e cmd_op;
  logic [ID_W-1:0] cmd_id1, cmd_id2, rd1_addr, rd2_addr, wr_addr, kill_addr;
  logic [XW-1:0] cmd_x;
  logic [YW-1:0] cmd_y;
  logic [REC_W-1:0] rd1_data, rd2_data, wr_data;
  logic wr_en, wr_new, kill_en;
  int checks = 0, failures = 0;

  hotspot_reconstructor #(.IM_WIDTH(W), .IM_HEIGHT(H), .MAX_HOTSPOTS(MAX)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int imax(int a, int b); return a > b ? a : b; endfunction
  function automatic int imin(int a, int b); return a < b ? a : b; endfunction

  initial begin
    int mx1, nx1, sx1, my1, ny1, sy1, c1, mx2, nx2, sx2, my2, ny2, sy2, c2;
    int emx, enx, esx, emy, eny, esy, ec, x, y;
    for (int i = 0; i < 2000; i++) begin
      cmd_valid = ($urandom % 8) != 0;
      cmd_op    = hs_op_e'($urandom % 4);
      cmd_id1   = ID_W'($urandom); cmd_id2 = ID_W'($urandom);
      x = $urandom % W; y = $urandom % H;
      cmd_x = XW'(x); cmd_y = YW'(y);
      mx1 = $urandom % W; nx1 = $urandom % W; my1 = $urandom % H; ny1 = $urandom % H;
      sx1 = $urandom % 1000; sy1 = $urandom % 500; c1 = $urandom % 100;
      mx2 = $urandom % W; nx2 = $urandom % W; my2 = $urandom % H; ny2 = $urandom % H;
      sx2 = $urandom % 1000; sy2 = $urandom % 500; c2 = $urandom % 100;
      rd1_data = {XW'(mx1), XW'(nx1), SX_W'(sx1), YW'(my1), YW'(ny1), SY_W'(sy1), CNT_W'(c1)};
      rd2_data = {XW'(mx2), XW'(nx2), SX_W'(sx2), YW'(my2), YW'(ny2), SY_W'(sy2), CNT_W'(c2)};
      #1;
      emx = x; enx = x; esx = x; emy = y; eny = y; esy = y; ec = 1;
      if (cmd_op != OP_NEW) begin
        emx = imax(emx, mx1); enx = imin(enx, nx1); esx += sx1;
        emy = imax(emy, my1); eny = imin(eny, ny1); esy += sy1; ec += c1;
      end
      if (cmd_op == OP_UNIFY) begin
        emx = imax(emx, mx2); enx = imin(enx, nx2); esx += sx2;
        emy = imax(emy, my2); eny = imin(eny, ny2); esy += sy2; ec += c2;
      end
      checks++;
      if (rd1_addr != cmd_id1 || rd2_addr != cmd_id2 || wr_addr != cmd_id1 ||
          kill_addr != cmd_id2 ||
          wr_en != (cmd_valid && cmd_op != OP_NONE) || wr_new != (cmd_valid && cmd_op == OP_NEW) ||
          kill_en != (cmd_valid && cmd_op == OP_UNIFY)) begin
        failures++; $display("strobe/address mismatch op=%0d", cmd_op);
      end
      if (cmd_op != OP_NONE) begin
        checks++;
        if (wr_data != {XW'(emx), XW'(enx), SX_W'(esx), YW'(emy), YW'(eny), SY_W'(esy), CNT_W'(ec)}) begin
          failures++;
          $display("record mismatch op=%0d got %h", cmd_op, wr_data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
