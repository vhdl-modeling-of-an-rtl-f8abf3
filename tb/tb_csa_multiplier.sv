// tb_csa_multiplier: exhaustive check of the 8x8 signed carry-save
// multiplier against the simulator's own signed multiplication.
module tb_csa_multiplier;
  logic signed [7:0]  a, b;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  csa_multiplier #(.W(8)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
