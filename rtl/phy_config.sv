// phy_config: writes start-up settings into the Ethernet physical-layer chip
// over its management interface (MDIO/MDC, IEEE 802.3 clause 22).
//
// After reset the module sends one write frame per entry of TABLE, each entry
// being {register address[4:0], value[15:0]}: 32 preamble ones, start 01,
// write opcode 01, PHY address, register address, turnaround 10 and the 16 data
// bits, MSB first. MDIO changes after the falling edge of MDC and is stable
// around its rising edge, when the PHY samples it. MDC = clk / (2 * CLK_DIV);
// with a 25 MHz clock and CLK_DIV = 14 that is 0.9 MHz, below the 2.5 MHz limit. Between
// frames and after the last one MDIO is released (mdio_oe low). done rises when
// the table has been sent.
//
// That the FPGA configures the physical-layer chip follows the design; the chip
// and its settings are not specified there. The sequencer is this
// implementation's own and the default table (register 0: enable and restart
// auto-negotiation) uses only standard clause 22 registers.
module phy_config #(
  parameter int unsigned CLK_DIV  = 14,
  parameter logic [4:0]  PHY_ADDR = 5'd0,
  parameter int unsigned N_REGS   = 1,
  parameter logic [20:0] TABLE [N_REGS] = '{ {5'd0, 16'h1200} }
) (
  input  logic clk,
  input  logic rst_n,
  output logic mdc,
  output logic mdio_o,
  output logic mdio_oe,
  output logic done
);

  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned IW = (N_REGS > 1) ? $clog2(N_REGS) : 1;

  logic [DW-1:0] div;
  logic [6:0]    bitn;      // 0..63 frame bits, 64..67 idle gap
  logic [IW-1:0] idx;
  logic [63:0]   frame;
  logic          tick;

  assign tick  = (div == DW'(CLK_DIV - 1));
  assign frame = {32'hFFFF_FFFF, 2'b01, 2'b01, PHY_ADDR, TABLE[idx][20:16], 2'b10, TABLE[idx][15:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div     <= '0;
      mdc     <= 1'b0;
      mdio_o  <= 1'b1;
      mdio_oe <= 1'b0;
      bitn    <= '0;
      idx     <= '0;
      done    <= 1'b0;
    end else if (!done) begin
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        mdc <= ~mdc;
        if (mdc) begin
          // falling edge of MDC: present the next bit
          if (bitn < 7'd64) begin
            mdio_oe <= 1'b1;
            mdio_o  <= frame[63 - bitn[5:0]];
          end else begin
            mdio_oe <= 1'b0;
            mdio_o  <= 1'b1;
          end
          if (bitn == 7'd67) begin
            bitn <= '0;
            if (idx == IW'(N_REGS - 1)) done <= 1'b1;
            else idx <= idx + 1'b1;
          end else begin
            bitn <= bitn + 1'b1;
          end
        end
      end
    end
  end

endmodule
