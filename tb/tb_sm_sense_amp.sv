// tb_sm_sense_amp: drives every column with random bit-line levels and checks
// the four operations against the thresholds written out independently.
module tb_sm_sense_amp;
  import sm_pkg::*;
  localparam int unsigned COLS = 32;
  sa_op_e op;
  logic [COLS-1:0][1:0] level;
  logic [COLS-1:0] q, e;
  int checks = 0, failures = 0;

  sm_sense_amp #(.COLS(COLS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      op = sa_op_e'(i % 4);
      for (int c = 0; c < COLS; c++) level[c] = 2'($urandom);
      #1;
      for (int c = 0; c < COLS; c++) begin
        case (i % 4)
          0, 1: e[c] = (level[c] != 0);
          2:    e[c] = (level[c] == 2 || level[c] == 3);
          default: e[c] = (level[c] == 1);
        endcase
      end
      checks++;
      if (q !== e) begin
        failures++;
        if (failures < 5) $display("FAIL op=%0d q=%h exp=%h", i % 4, q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
