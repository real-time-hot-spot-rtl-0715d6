// tb_phy_config: a management-interface target model samples MDIO on every
// rising MDC edge while it is driven, splits the bit stream into clause 22
// frames and checks preamble, start, write opcode, PHY address, register
// address, turnaround and data of each against the table, in order. Also checks
// that MDIO never changes while MDC is high, that MDC runs at clk / (2 * CLK_DIV)
// and that done rises after the last frame.
module tb_phy_config;
  localparam int unsigned N = 3;
  localparam logic [20:0] TAB [N] = '{ {5'd0, 16'h1200}, {5'd4, 16'h01E1}, {5'd27, 16'hA5C3} };
  logic clk = 0, rst_n = 0, mdc, mdio_o, mdio_oe, done;
  int checks = 0, failures = 0;

  phy_config #(.CLK_DIV(2), .PHY_ADDR(5'd7), .N_REGS(N), .TABLE(TAB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] sh;
  int nb = 0, nf = 0;
  logic mdc_d = 0, mdio_d = 1;
  int cyc = 0, last_rise = -1;
  always @(posedge clk) begin
    cyc++;
    mdc_d <= mdc; mdio_d <= mdio_o;
    if (rst_n && mdc && mdc_d && mdio_oe && mdio_o != mdio_d) begin
      checks++; failures++; $display("MDIO changed while MDC high");
    end
    if (rst_n && mdc && !mdc_d) begin
      if (last_rise >= 0) begin
        checks++;
        if (cyc - last_rise != 4) begin failures++; $display("MDC period %0d clocks, expected 4", cyc - last_rise); end
      end
      last_rise = cyc;
      if (mdio_oe) begin
        sh = {sh[62:0], mdio_o};
        nb++;
        if (nb == 64) begin
          checks += 7;
          if (nf >= N) begin
            failures++; $display("extra frame %h", sh);
          end else begin
            if (sh[63:32] != 32'hFFFF_FFFF) begin failures++; $display("frame %0d: preamble %h", nf, sh[63:32]); end
            if (sh[31:30] != 2'b01)         begin failures++; $display("frame %0d: start %b", nf, sh[31:30]); end
            if (sh[29:28] != 2'b01)         begin failures++; $display("frame %0d: opcode %b", nf, sh[29:28]); end
            if (sh[27:23] != 5'd7)          begin failures++; $display("frame %0d: PHY address %0d", nf, sh[27:23]); end
            if (sh[22:18] != TAB[nf][20:16]) begin failures++; $display("frame %0d: register %0d", nf, sh[22:18]); end
            if (sh[17:16] != 2'b10)         begin failures++; $display("frame %0d: turnaround %b", nf, sh[17:16]); end
            if (sh[15:0] != TAB[nf][15:0])  begin failures++; $display("frame %0d: data %h", nf, sh[15:0]); end
          end
          nf++; nb = 0;
        end
      end else if (nb != 0) begin
        checks++; failures++; $display("frame cut after %0d bits", nb); nb = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (20) @(posedge clk);
    checks++;
    if (nf != N || mdio_oe) begin failures++; $display("%0d frames", nf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
