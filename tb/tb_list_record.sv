// tb_list_record: checks one record of list L. The register must load id_in on
// enable only, and the value offered to the next record must be id_x exactly
// when a unification is requested and the stored id equals id_y.
module tb_list_record;
  localparam int unsigned ID_W = 4;
  logic clk = 0, rst_n = 0, en, unify;
  logic [ID_W-1:0] id_in, id_x, id_y, id_q, id_fwd, exp_q;
  int checks = 0, failures = 0;

  list_record #(.ID_W(ID_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; unify = 0; id_in = 0; id_x = 0; id_y = 0; exp_q = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en    = ($urandom % 3) != 0;
      unify = $urandom % 2;
      id_in = ID_W'($urandom);
      id_x  = ID_W'($urandom);
      // make id_y hit the stored id half of the time
      id_y  = ($urandom % 2) ? exp_q : ID_W'($urandom);
      #1;
      checks++;
      if (id_fwd !== ((unify && exp_q == id_y) ? id_x : exp_q)) begin
        failures++;
        $display("fwd mismatch q=%0d y=%0d x=%0d u=%0d fwd=%0d", exp_q, id_y, id_x, unify, id_fwd);
      end
      @(posedge clk);
      if (en) exp_q = id_in;
      #1;
      checks++;
      if (id_q !== exp_q) begin
        failures++;
        $display("q mismatch exp=%0d got=%0d", exp_q, id_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
