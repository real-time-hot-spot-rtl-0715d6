// cfg_sync: carries a configuration word from one clock domain to another.
//
// On src_upd the source side captures src_data into a holding register and
// flips a toggle. The toggle crosses through a two-flop synchroniser; when the
// destination sees it change, the holding register has been stable for at least
// two destination clocks and is copied into dst_data. Updates closer together
// than about three destination clocks may be merged (the last one wins). Used
// for the classification threshold, which is written in the MAC clock domain and
// used in the pixel clock domain. This block is this implementation's choice.
module cfg_sync #(
  parameter int unsigned    W         = 8,
  parameter logic [W-1:0]   RST_VALUE = '0
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic         src_upd,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data
);

  logic [W-1:0] hold;
  logic         tog, tog_s1, tog_s2, tog_s3;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold <= RST_VALUE;
      tog  <= 1'b0;
    end else if (src_upd) begin
      hold <= src_data;
      tog  <= ~tog;
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      tog_s1   <= 1'b0;
      tog_s2   <= 1'b0;
      tog_s3   <= 1'b0;
      dst_data <= RST_VALUE;
    end else begin
      tog_s1 <= tog;
      tog_s2 <= tog_s1;
      tog_s3 <= tog_s2;
      if (tog_s2 != tog_s3) dst_data <= hold;
    end
  end

endmodule
