// cdc_fifo: asynchronous FIFO between the pixel clock and the Ethernet MAC clock.
//
// The hot spot results are produced in the pixel clock domain and sent out in the
// MAC clock domain; this FIFO carries them across. It is the classic dual-clock
// FIFO: binary read and write pointers with one extra wrap bit, exchanged between
// the domains in Gray code through two-flop synchronisers, so that a pointer seen
// in the other domain is never more than one increment off and the full/empty
// decisions are always safe (full may be reported late, empty early).
// Using a FIFO for the clock crossing follows the design; its organisation and
// the level outputs are this implementation's choices.
//
// Interface: write side wr_en/wr_data, wr_full and wr_free (free entries as seen
// from the write side, conservative). Read side is first-word-fall-through:
// rd_data shows the head entry whenever rd_empty is low, rd_en pops it, rd_count
// is the number of entries as seen from the read side (conservative). Writing
// when full and reading when empty are ignored. DEPTH must be a power of two.
module cdc_fifo #(
  parameter int unsigned WIDTH = 107,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  output logic [AW:0]      wr_free,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty,
  output logic [AW:0]      rd_count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_s1, rgray_s2, wgray_s1, wgray_s2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ------------------------------------------------------------ write domain
  assign rbin_w  = gray2bin(rgray_s2);
  assign wr_free = (AW+1)'(DEPTH) - (wbin - rbin_w);
  assign wr_full = (wbin - rbin_w) == (AW+1)'(DEPTH);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ------------------------------------------------------------- read domain
  assign wbin_r   = gray2bin(wgray_s2);
  assign rd_count = wbin_r - rbin;
  assign rd_empty = (wbin_r == rbin);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
