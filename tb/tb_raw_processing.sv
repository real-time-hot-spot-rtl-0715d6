// tb_raw_processing: drives random binary frames through the labelling stage and
// compares every command with a reference model of the labelling algorithm. The
// model keeps the previous line as an array indexed by column (not as a shift
// chain) and relabels it with a loop on unification. Frames of growing hot pixel
// density push the small id space into overflow. Also checks that a command
// appears exactly one clock after its pixel.
module tb_raw_processing;
  import hotspot_pkg::*;
  localparam int unsigned W = 8, H = 6, MAX = 16;
  localparam int unsigned ID_W = $clog2(MAX);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_hot, in_sof, in_eof;
  logic [2:0] in_x;
  logic [2:0] in_y;
  logic cmd_valid, cmd_eof, cmd_overflow;
  hs_op_e cmd_op;
  logic [ID_W-1:0] cmd_id1, cmd_id2;
  logic [2:0] cmd_x, cmd_y;
  int checks = 0, failures = 0;
  int n_new = 0, n_add = 0, n_unify = 0, n_ovf = 0;

  raw_processing #(.IM_WIDTH(W), .IM_HEIGHT(H), .MAX_HOTSPOTS(MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int line_id [W];
  int next_id;
  bit ovf;

  task automatic model(input bit hot, input int x, input int y,
                       output hs_op_e op, output int id1, output int id2, output bit refused);
    int l, u;
    l = (x > 0) ? line_id[x-1] : 0;
    u = (y > 0) ? line_id[x] : 0;
    op = OP_NONE; id1 = 0; id2 = 0; refused = 0;
    if (hot) begin
      if (l == 0 && u == 0) begin
        if (next_id < MAX) begin op = OP_NEW; id1 = next_id; next_id++; end
        else refused = 1;
      end else if (l != 0 && u != 0 && l != u) begin
        op  = OP_UNIFY;
        id1 = (l < u) ? l : u;
        id2 = (l < u) ? u : l;
        foreach (line_id[i]) if (line_id[i] == id2) line_id[i] = id1;
      end else begin
        op  = OP_ADD;
        id1 = (l != 0) ? l : u;
      end
    end
    line_id[x] = id1;
  endtask

  initial begin
    hs_op_e eop; int e1, e2; bit refd;
    in_valid = 0; in_hot = 0; in_sof = 0; in_eof = 0; in_x = 0; in_y = 0;
    foreach (line_id[i]) line_id[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      automatic int dens = 20 + (f % 6) * 15;   // percent of hot pixels
      next_id = 1; ovf = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          bit hot;
          // occasional idle clocks between pixels
          while ($urandom % 4 == 0) begin
            @(negedge clk); in_valid = 0;
            @(posedge clk); #1;
            checks++;
            if (cmd_valid) begin failures++; $display("cmd without pixel"); end
          end
          // every seventh frame is a checkerboard: 24 isolated spots exceed the 15 ids
          hot = (f % 7 == 6) ? ((x + y) % 2 == 0) : (($urandom % 100) < dens);
          @(negedge clk);
          in_valid = 1; in_hot = hot; in_x = 3'(x); in_y = 3'(y);
          in_sof = (x == 0 && y == 0); in_eof = (x == W-1 && y == H-1);
          model(hot, x, y, eop, e1, e2, refd);
          ovf |= refd;
          @(posedge clk); #1;
          in_valid = 0;
          checks++;
          if (!cmd_valid || cmd_op != eop || int'(cmd_id1) != e1 ||
              (eop == OP_UNIFY && int'(cmd_id2) != e2) || cmd_x != 3'(x) || cmd_y != 3'(y) ||
              cmd_eof != (x == W-1 && y == H-1)) begin
            failures++;
            $display("f%0d (%0d,%0d): exp op=%0d id1=%0d id2=%0d got v=%0d op=%0d id1=%0d id2=%0d",
                     f, x, y, eop, e1, e2, cmd_valid, cmd_op, cmd_id1, cmd_id2);
          end
          if (cmd_eof) begin
            checks++;
            if (cmd_overflow != ovf) begin failures++; $display("overflow flag mismatch"); end
          end
          case (eop)
            OP_NEW:   n_new++;
            OP_ADD:   n_add++;
            OP_UNIFY: n_unify++;
            default:  ;
          endcase
          if (refd) n_ovf++;
        end
      end
    end
    $display("ops: new=%0d add=%0d unify=%0d refused=%0d", n_new, n_add, n_unify, n_ovf);
    checks++;
    if (n_new == 0 || n_add == 0 || n_unify == 0 || n_ovf == 0) begin
      failures++; $display("a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
