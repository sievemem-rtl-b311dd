// tb_sm_bp_or: XORs two random 16-base words encoded 2 bits per base and
// checks that the OR gates flag exactly the bases that differ.
module tb_sm_bp_or;
  logic [31:0] bits, ra, rb;
  logic [15:0] bp, e;
  int checks = 0, failures = 0;

  sm_bp_or #(.NBP(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      ra = $urandom; rb = ra;
      for (int k = 0; k < 16; k++) if ($urandom % 4 == 0) rb[2*k +: 2] = 2'($urandom);
      bits = ra ^ rb;
      #1;
      for (int k = 0; k < 16; k++) e[k] = (ra[2*k +: 2] != rb[2*k +: 2]);
      checks++;
      if (bp !== e) begin
        failures++;
        if (failures < 5) $display("FAIL bits=%h bp=%h exp=%h", bits, bp, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
