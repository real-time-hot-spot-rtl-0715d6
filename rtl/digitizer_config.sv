// digitizer_config: writes the start-up register settings into the SAA7113
// video digitiser over its I2C bus.
//
// After reset the module walks a table of N_REGS {sub-address, value} pairs
// (the configuration memory) and sends each as one I2C write transaction:
// START, device address with the write bit, sub-address, value, STOP, checking
// the acknowledge after every byte. The bus is open-drain: scl_oe/sda_oe high
// pull the line low, sda_in reads it back. Each bit takes four phases of
// CLK_DIV clocks (SCL low / rising / high / falling), so SCL = clk / (4 * CLK_DIV);
// with the 27 MHz pixel clock and CLK_DIV = 68 that is about 99 kHz. done rises
// when the table has been sent; nack_err is set if any byte was not
// acknowledged (the transaction is still completed, the next one follows).
//
// That the FPGA configures the digitiser from a configuration memory follows the
// design. The I2C sequencer is this implementation's own; the device address
// (0x4A for writes) and the default table, which selects a composite input and
// ITU-R BT.656 output, are typical settings for this chip and are not part of
// the design, so TABLE should be checked against the camera and board in use.
module digitizer_config #(
  parameter int unsigned CLK_DIV  = 68,
  parameter logic [6:0]  DEV_ADDR = 7'h25,
  parameter int unsigned N_REGS   = 16,
  parameter logic [15:0] TABLE [N_REGS] = '{
    16'h01_08, 16'h02_C0, 16'h03_33, 16'h04_00, 16'h05_00, 16'h06_E9, 16'h07_0D, 16'h08_98,
    16'h09_01, 16'h0A_80, 16'h0B_47, 16'h0C_40, 16'h0D_00, 16'h0E_01, 16'h10_00, 16'h11_0C
  }
) (
  input  logic clk,
  input  logic rst_n,
  output logic scl_oe,     // 1: pull SCL low
  output logic sda_oe,     // 1: pull SDA low
  input  logic sda_in,
  output logic done,
  output logic nack_err
);

  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned IW = (N_REGS > 1) ? $clog2(N_REGS) : 1;

  typedef enum logic [2:0] {S_START, S_BITS, S_STOP, S_GAP, S_DONE} state_e;
  state_e state;

  logic [DW-1:0] div;
  logic [1:0]    phase;
  logic [4:0]    bitn;       // 0..26: three 9-bit slots (8 data bits + acknowledge)
  logic [IW-1:0] idx;
  logic [26:0]   frame;      // bits to send, MSB first; acknowledge slots are 1 (released)
  logic          tick;

  assign tick  = (div == DW'(CLK_DIV - 1));
  assign frame = {DEV_ADDR, 1'b0, 1'b1, TABLE[idx][15:8], 1'b1, TABLE[idx][7:0], 1'b1};

  logic ack_slot;
  assign ack_slot = (bitn == 5'd8) || (bitn == 5'd17) || (bitn == 5'd26);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_START;
      div      <= '0;
      phase    <= '0;
      bitn     <= '0;
      idx      <= '0;
      scl_oe   <= 1'b0;
      sda_oe   <= 1'b0;
      done     <= 1'b0;
      nack_err <= 1'b0;
    end else begin
      div <= tick ? '0 : div + 1'b1;
      if (tick && state != S_DONE) begin
        phase <= phase + 1'b1;
        case (state)
          // SCL high: SDA falls (phase 1), then SCL falls (phase 3)
          S_START: begin
            case (phase)
              2'd0: begin scl_oe <= 1'b0; sda_oe <= 1'b0; end
              2'd1: sda_oe <= 1'b1;
              2'd3: begin scl_oe <= 1'b1; bitn <= '0; state <= S_BITS; end
              default: ;
            endcase
          end
          // phase 0: set SDA while SCL low; 1: SCL high; 2: sample; 3: SCL low
          S_BITS: begin
            case (phase)
              2'd0: sda_oe <= !frame[26 - bitn];
              2'd1: scl_oe <= 1'b0;
              2'd2: if (ack_slot && sda_in) nack_err <= 1'b1;
              default: begin
                scl_oe <= 1'b1;
                if (bitn == 5'd26) state <= S_STOP;
                else bitn <= bitn + 1'b1;
              end
            endcase
          end
          // SDA low while SCL low, SCL rises, then SDA rises
          S_STOP: begin
            case (phase)
              2'd0: sda_oe <= 1'b1;
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b0;
              default: state <= S_GAP;
            endcase
          end
          // bus free time, then the next entry
          S_GAP: begin
            if (phase == 2'd3) begin
              if (idx == IW'(N_REGS - 1)) begin
                state <= S_DONE;
                done  <= 1'b1;
              end else begin
                idx   <= idx + 1'b1;
                state <= S_START;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
