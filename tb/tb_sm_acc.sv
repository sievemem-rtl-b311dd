// tb_sm_acc: random clear/enable/input sequences against a reference AND
// accumulator, including clear and enable in the same cycle.
module tb_sm_acc;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [15:0] in, acc, model;
  int checks = 0, failures = 0;

  sm_acc #(.W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = '1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 5) $display("FAIL acc=%h exp=%h", acc, model);
      end
      clr = ($urandom % 8 == 0);
      en  = ($urandom % 2 == 0);
      in  = 16'($urandom) | 16'($urandom);
      @(posedge clk);
      if (clr) model = '1;
      else if (en) model = model & in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
