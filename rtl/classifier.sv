// classifier: decides for every raw pixel whether it is hot.
//
// A pixel is hot when its value is at least the threshold. The threshold is a
// run-time input, set through the application configuration. The coordinates and
// frame flags travel along unchanged. Classifying by the pixel value against a
// configurable threshold follows the design; the ">=" comparison is this
// implementation's choice.
//
// Timing: one register stage; out_* follow in_* by one clock.
module classifier
  import hotspot_pkg::*;
#(
  parameter int unsigned IM_WIDTH  = hotspot_pkg::DEF_IM_WIDTH,
  parameter int unsigned IM_HEIGHT = hotspot_pkg::DEF_IM_HEIGHT,
  localparam int unsigned XW = $clog2(IM_WIDTH),
  localparam int unsigned YW = $clog2(IM_HEIGHT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] threshold,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_data,
  input  logic [XW-1:0]    in_x,
  input  logic [YW-1:0]    in_y,
  input  logic             in_sof,
  input  logic             in_eof,
  output logic             out_valid,
  output logic             out_hot,
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y,
  output logic             out_sof,
  output logic             out_eof
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hot   <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_hot   <= in_valid && (in_data >= threshold);
      out_x     <= in_x;
      out_y     <= in_y;
      out_sof   <= in_valid && in_sof;
      out_eof   <= in_valid && in_eof;
    end
  end

endmodule
