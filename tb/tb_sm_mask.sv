// tb_sm_mask: checks the reset value (all ones), mask writes and the AND of
// random inputs with the last written mask.
module tb_sm_mask;
  logic clk = 0, rst_n = 0, we = 0;
  logic [15:0] wmask, in, out, mask, model;
  int checks = 0, failures = 0;

  sm_mask #(.W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0; wmask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = '1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      in = 16'($urandom);
      we = (i % 5 == 0) && (i > 20);
      wmask = 16'($urandom);
      #1;
      checks++;
      if (out !== (in & model) || mask !== model) begin
        failures++;
        if (failures < 5) $display("FAIL in=%h out=%h exp=%h", in, out, in & model);
      end
      @(posedge clk);
      if (we) model = wmask;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
