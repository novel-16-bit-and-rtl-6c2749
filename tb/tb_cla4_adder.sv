// tb_cla4_adder: exhaustive check of the first-stage 4-bit CLA adder over all
// 256 input pairs (BCD and non-BCD codes) against integer addition.
module tb_cla4_adder;
  logic [3:0] a, b, sum;
  logic       cout;
  int checks = 0, failures = 0;

  cla4_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if ({cout, sum} != 5'(i + j)) begin
          failures++;
          $display("FAIL %0d+%0d got %0d", i, j, {cout, sum});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
