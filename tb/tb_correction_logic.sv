// tb_correction_logic: for every first-stage digit sum 0..18 and every carry
// in, applies the correction the adder would choose (6 when sum + carry >= 10,
// plus the carry) and checks that the result is (sum + carry) mod 10.
module tb_correction_logic;
  logic [3:0] bin_sum, corr, digit;
  int checks = 0, failures = 0;

  correction_logic dut (.bin_sum(bin_sum), .corr(corr), .digit(digit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s <= 18; s++) begin
      for (int c = 0; c < 2; c++) begin
        bin_sum = 4'(s);
        corr    = 4'(((s + c >= 10) ? 6 : 0) + c);
        #1;
        checks++;
        if (int'(digit) != (s + c) % 10) begin
          failures++;
          $display("FAIL S=%0d c=%0d got %0d", s, c, digit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
