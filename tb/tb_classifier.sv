// tb_classifier: random pixels and thresholds; a pixel must come out hot exactly
// when its value is at least the threshold, one clock later, with coordinates and
// frame flags unchanged.
module tb_classifier;
  logic clk = 0, rst_n = 0;
  logic [7:0] threshold, in_data;
  logic in_valid, in_sof, in_eof, out_valid, out_hot, out_sof, out_eof;
  logic [8:0] in_x, out_x;
  logic [7:0] in_y, out_y;
  int checks = 0, failures = 0;

  classifier dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] t, d; logic v, s, e; logic [8:0] x; logic [7:0] y;
    in_valid = 0; in_data = 0; in_x = 0; in_y = 0; in_sof = 0; in_eof = 0; threshold = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      t = 8'($urandom); d = (i % 4 == 0) ? t : 8'($urandom);
      v = ($urandom % 4) != 0; s = $urandom % 2; e = $urandom % 2;
      x = 9'($urandom); y = 8'($urandom);
      threshold = t; in_data = d; in_valid = v; in_sof = s; in_eof = e; in_x = x; in_y = y;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v || out_hot !== (v && d >= t) || (v && (out_x !== x || out_y !== y ||
          out_sof !== s || out_eof !== e))) begin
        failures++;
        $display("mismatch d=%0d t=%0d hot=%0d", d, t, out_hot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
