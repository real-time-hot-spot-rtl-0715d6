// tb_hotspot_memory: random writes, creations and invalidations into the current
// bank, checked against a model of both banks; at every swap the previous bank
// must show the completed frame (records, valid bits, count, overflow flag) and
// the new current bank must start with no valid records.
module tb_hotspot_memory;
  localparam int unsigned W = 16, H = 8, MAX = 8;
  localparam int unsigned ID_W = 3, REC_W = 2*4 + 12 + 2*3 + 11 + 8;

  logic clk = 0, rst_n = 0;
  logic [ID_W-1:0] rd1_addr, rd2_addr, wr_addr, kill_addr, prev_addr;
  logic [REC_W-1:0] rd1_data, rd2_data, wr_data, prev_data;
  logic wr_en, wr_new, kill_en, swap, swap_overflow, prev_valid, prev_overflow, prev_ready;
  logic [ID_W:0] prev_count;
  int checks = 0, failures = 0;

  hotspot_memory #(.IM_WIDTH(W), .IM_HEIGHT(H), .MAX_HOTSPOTS(MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [REC_W-1:0] mrec [2][MAX];
  bit               mvld [2][MAX];
  int               cur, cnt;

  initial begin
    bit ovf;
    wr_en = 0; wr_new = 0; kill_en = 0; swap = 0; swap_overflow = 0;
    rd1_addr = 0; rd2_addr = 0; wr_addr = 0; kill_addr = 0; prev_addr = 0; wr_data = 0;
    cur = 0; cnt = 0;
    foreach (mvld[b, i]) mvld[b][i] = 0;
    foreach (mrec[b, i]) mrec[b][i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise both banks' records so reads are defined
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < MAX; i++) begin
        @(negedge clk); wr_en = 1; wr_addr = ID_W'(i); wr_data = '0;
      end
      @(negedge clk); wr_en = 0; swap = 1;
      @(negedge clk); swap = 0;
    end
    for (int f = 0; f < 40; f++) begin
      for (int s = 0; s < 30; s++) begin
        @(negedge clk);
        rd1_addr = ID_W'($urandom); rd2_addr = ID_W'($urandom);
        #1;
        checks++;
        if (rd1_data !== mrec[cur][rd1_addr] || rd2_data !== mrec[cur][rd2_addr]) begin
          failures++; $display("current read mismatch");
        end
        wr_en = $urandom % 2; wr_addr = ID_W'($urandom); wr_data = REC_W'({$urandom, $urandom});
        // create only free ids, invalidate only valid ones (as the labeller does)
        wr_new  = wr_en && !mvld[cur][wr_addr];
        kill_addr = ID_W'($urandom);
        kill_en = !wr_new && mvld[cur][kill_addr] && kill_addr != wr_addr && ($urandom % 3 == 0);
        swap = (s == 29); ovf = $urandom % 2; swap_overflow = ovf;
        @(posedge clk);
        if (wr_en) mrec[cur][wr_addr] = wr_data;
        if (wr_new) begin mvld[cur][wr_addr] = 1; cnt++; end
        if (kill_en) begin mvld[cur][kill_addr] = 0; cnt--; end
        #1;
        wr_en = 0; wr_new = 0; kill_en = 0;
        if (swap) begin
          swap = 0;
          checks++;
          if (!prev_ready || prev_count != (ID_W+1)'(cnt) || prev_overflow != ovf) begin
            failures++; $display("swap status mismatch cnt=%0d got %0d", cnt, prev_count);
          end
          // read back the completed bank through the previous-side port
          for (int i = 0; i < MAX; i++) begin
            @(negedge clk); prev_addr = ID_W'(i);
            @(posedge clk); #1;
            checks++;
            if (prev_valid != mvld[cur][i] || prev_data !== mrec[cur][i]) begin
              failures++; $display("previous bank mismatch id %0d", i);
            end
          end
          cur = 1 - cur; cnt = 0;
          foreach (mvld[cur][i]) mvld[cur][i] = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
