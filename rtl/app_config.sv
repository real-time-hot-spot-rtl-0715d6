// app_config: run-time application settings, written over the network.
//
// Watches the frames received by the MAC (Ethernet II, IPv4 without options,
// UDP) and accepts those addressed to own_ip and to UDP port CFG_PORT. Their
// payload is a sequence of 5-byte writes {register, value[31:0] big-endian},
// each applied as soon as its last byte arrives:
//   0x00  classification threshold (low 8 bits)
//   0x01  destination IPv4 address of the results
//   0x02  destination UDP port of the results (low 16 bits)
//   0x03  destination MAC address, bits 47..32 (low 16 bits of the value)
//   0x04  destination MAC address, bits 31..0
// Unknown registers are ignored. That the threshold and the destination
// address and port are set through the Ethernet connection follows the design;
// the packet format, register map and reset values are this implementation's
// choices. Frames are assumed to arrive with a correct FCS (checked by the MAC).
//
// Interface: receive byte stream rx_data/rx_valid/rx_last (rx_last on the final
// byte of a frame); settings are registered outputs, thr_upd pulses for one
// clock when the threshold is written.
module app_config
  import hotspot_pkg::*;
#(
  parameter logic [15:0]      CFG_PORT     = 16'd5000,
  parameter logic [PIX_W-1:0] RST_THRESH   = 8'd200,
  parameter logic [31:0]      RST_DST_IP   = 32'hC0A8_0001,
  parameter logic [15:0]      RST_DST_PORT = 16'd5001,
  parameter logic [47:0]      RST_DST_MAC  = 48'hFFFF_FFFF_FFFF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      own_ip,
  input  logic [7:0]       rx_data,
  input  logic             rx_valid,
  input  logic             rx_last,
  output logic [PIX_W-1:0] threshold,
  output logic             thr_upd,
  output logic [31:0]      dst_ip,
  output logic [15:0]      dst_port,
  output logic [47:0]      dst_mac
);

  logic [10:0] idx;       // byte index in the frame, saturating
  logic        match;     // frame still qualifies
  logic [2:0]  grp;       // byte index inside a 5-byte write
  logic [7:0]  reg_a;
  logic [23:0] val_hi;    // first three value bytes

  // expected byte at a header position, and whether that position is checked
  logic       chk;
  logic [7:0] exp_b;
  always_comb begin
    chk   = 1'b1;
    exp_b = 8'h00;
    case (idx)
      11'd12: exp_b = 8'h08;
      11'd13: exp_b = 8'h00;
      11'd14: exp_b = 8'h45;
      11'd23: exp_b = 8'h11;
      11'd30: exp_b = own_ip[31:24];
      11'd31: exp_b = own_ip[23:16];
      11'd32: exp_b = own_ip[15:8];
      11'd33: exp_b = own_ip[7:0];
      11'd36: exp_b = CFG_PORT[15:8];
      11'd37: exp_b = CFG_PORT[7:0];
      default: chk = 1'b0;
    endcase
  end

  logic ok_now;
  assign ok_now = match && (!chk || rx_data == exp_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      match     <= 1'b1;
      grp       <= '0;
      reg_a     <= '0;
      val_hi    <= '0;
      threshold <= RST_THRESH;
      thr_upd   <= 1'b0;
      dst_ip    <= RST_DST_IP;
      dst_port  <= RST_DST_PORT;
      dst_mac   <= RST_DST_MAC;
    end else begin
      thr_upd <= 1'b0;
      if (rx_valid) begin
        if (rx_last) begin
          idx   <= '0;
          match <= 1'b1;
          grp   <= '0;
        end else begin
          if (idx != '1) idx <= idx + 1'b1;
          match <= ok_now;
        end
        if (ok_now && idx >= 11'd42) begin
          grp <= (grp == 3'd4) ? 3'd0 : grp + 1'b1;
          case (grp)
            3'd0:    reg_a  <= rx_data;
            3'd1:    val_hi[23:16] <= rx_data;
            3'd2:    val_hi[15:8]  <= rx_data;
            3'd3:    val_hi[7:0]   <= rx_data;
            default: begin
              case (reg_a)
                8'h00: begin
                  threshold <= rx_data[PIX_W-1:0];
                  thr_upd   <= 1'b1;
                end
                8'h01: dst_ip          <= {val_hi, rx_data};
                8'h02: dst_port        <= {val_hi[7:0], rx_data};
                8'h03: dst_mac[47:32]  <= {val_hi[7:0], rx_data};
                8'h04: dst_mac[31:0]   <= {val_hi, rx_data};
                default: ;
              endcase
            end
          endcase
          if (rx_last) grp <= '0;
        end
      end
    end
  end

endmodule
