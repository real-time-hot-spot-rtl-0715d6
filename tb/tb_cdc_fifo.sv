// tb_cdc_fifo: writer and reader on unrelated clocks (10 ns and 13 ns) with
// random push and pop rates; every word must arrive once and in order, the FIFO
// must report full (the writer is fast enough to fill it) and the level outputs
// must never claim more room or more data than there is.
module tb_cdc_fifo;
  localparam int unsigned WIDTH = 16, DEPTH = 8, AW = 3;

  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en, rd_en, wr_full, rd_empty;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [AW:0] wr_free, rd_count;
  int checks = 0, failures = 0, n_full = 0;

  cdc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 wr_clk = ~wr_clk;
  always #6.5 rd_clk = ~rd_clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] sent [$];
  int n_sent = 0, n_recv = 0;
  localparam int N = 2000;

  // writer
  initial begin
    wr_en = 0; wr_data = 0;
    repeat (3) @(posedge wr_clk);
    wr_rst_n = 1;
    while (n_sent < N) begin
      @(negedge wr_clk);
      wr_en = ($urandom % 4) != 0 && !wr_full;
      wr_data = WIDTH'($urandom);
      if (wr_full) n_full++;
      checks++;
      if (int'(wr_free) > DEPTH - sent.size()) begin
        failures++; $display("wr_free %0d too large (held %0d)", wr_free, sent.size());
      end
      @(posedge wr_clk);
      if (wr_en) begin sent.push_back(wr_data); n_sent++; end
    end
    @(negedge wr_clk); wr_en = 0;
  end

  // reader: slow phases let the FIFO fill up
  initial begin
    rd_en = 0;
    repeat (3) @(posedge rd_clk);
    rd_rst_n = 1;
    while (n_recv < N) begin
      @(negedge rd_clk);
      rd_en = !rd_empty && (((n_recv / 200) % 2) ? ($urandom % 2 == 0) : ($urandom % 8 == 0));
      if (!rd_empty) begin
        checks++;
        if (int'(rd_count) > sent.size()) begin
          failures++; $display("rd_count %0d too large", rd_count);
        end
      end
      if (rd_en) begin
        checks++;
        if (sent.size() == 0 || rd_data !== sent[0]) begin
          failures++; $display("data mismatch at %0d", n_recv);
        end
        if (sent.size() != 0) void'(sent.pop_front());
        n_recv++;
      end
      @(posedge rd_clk);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never became full"); end
    $display("full seen %0d times", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
