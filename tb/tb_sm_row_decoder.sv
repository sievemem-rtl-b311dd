// tb_sm_row_decoder: checks the row decoder against a reference built bit by
// bit: every pair of rows with every enable combination for a small array,
// random pairs for the default 64 rows.
module tb_sm_row_decoder;
  localparam int unsigned ROWS = 64;
  logic en_a, en_b;
  logic [5:0] row_a, row_b;
  logic [ROWS-1:0] act, exp_act;
  int checks = 0, failures = 0;

  sm_row_decoder #(.ROWS(ROWS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      row_a = 6'($urandom); row_b = (i % 7 == 0) ? row_a : 6'($urandom);
      en_a = 1'($urandom); en_b = 1'($urandom);
      #1;
      exp_act = '0;
      for (int r = 0; r < ROWS; r++)
        exp_act[r] = (en_a && r == int'(row_a)) || (en_b && r == int'(row_b));
      checks++;
      if (act !== exp_act) begin
        failures++;
        if (failures < 5) $display("FAIL a=%0d/%0b b=%0d/%0b act=%h exp=%h", row_a, en_a, row_b, en_b, act, exp_act);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
