// tb_digitizer_config: an I2C target model on the open-drain bus decodes START,
// STOP and every byte, acknowledges them and compares each transaction with the
// configuration table: device address with write bit, sub-address, value, in
// table order. The target withholds the acknowledge once, which must set
// nack_err. Also checks that SDA only changes while SCL is low, except for
// START and STOP, and the SCL period.
module tb_digitizer_config;
  localparam int unsigned DIV = 3, N = 5;
  localparam logic [15:0] TAB [N] = '{16'h01_08, 16'h02_C0, 16'h0A_80, 16'h0B_47, 16'h11_0C};

  logic clk = 0, rst_n = 0, scl_oe, sda_oe, sda_in, done, nack_err;
  logic tgt_pull = 0;
  wire  scl = !scl_oe;
  wire  sda = !(sda_oe || tgt_pull);
  assign sda_in = sda;
  int checks = 0, failures = 0;

  digitizer_config #(.CLK_DIV(DIV), .DEV_ADDR(7'h25), .N_REGS(N), .TABLE(TAB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // target model
  logic [7:0] bytes [$];
  logic [7:0] sh;
  int nbit = 0, ntrans = 0, nstart = 0, nstop = 0;
  bit in_trans = 0;
  logic scl_d = 1, sda_d = 1;
  int t_rise = 0, t_prev_rise = 0, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    scl_d <= scl; sda_d <= sda;
    if (rst_n) begin
      if (scl && scl_d && sda_d && !sda) begin          // START
        nstart++; in_trans = 1; nbit = 0; bytes.delete();
      end else if (scl && scl_d && !sda_d && sda) begin // STOP
        nstop++; in_trans = 0;
        checks++;
        if (bytes.size() != 3 || ntrans >= N || bytes[0] != 8'h4A ||
            bytes[1] != TAB[ntrans][15:8] || bytes[2] != TAB[ntrans][7:0]) begin
          failures++; $display("transaction %0d wrong (%0d bytes)", ntrans, bytes.size());
        end
        ntrans++;
      end else if (scl && scl_d && sda != sda_d) begin
        checks++; failures++; $display("SDA changed while SCL high");
      end
      if (scl && !scl_d && in_trans) begin                // rising SCL: sample
        if (t_prev_rise != 0) begin
          checks++;
          if (cyc - t_rise != 4 * DIV && nbit != 0) begin
            failures++; $display("SCL period %0d", cyc - t_rise);
          end
        end
        t_prev_rise = t_rise; t_rise = cyc;
        if (nbit % 9 != 8) sh = {sh[6:0], sda};
        else bytes.push_back(sh);
        nbit++;
      end
      if (!scl && scl_d && in_trans) begin                // falling SCL: drive ACK
        // acknowledge during the 9th bit of each byte, except the address of transaction 3
        tgt_pull <= (nbit % 9 == 8) && !(ntrans == 3 && nbit == 8);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (20) @(posedge clk);
    checks++;
    if (ntrans != N || nstart != N || nstop != N) begin
      failures++; $display("%0d transactions, %0d starts, %0d stops", ntrans, nstart, nstop);
    end
    checks++;
    if (!nack_err) begin failures++; $display("missing acknowledge not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
