// tb_carry_suppressor: all 16 input combinations. V must follow
// V = Cn | Pn.Pp.Cp and the correction must be 6.V + Cp (0, 1, 6 or 7).
module tb_carry_suppressor;
  logic cn, pn, pp, cp;
  logic [3:0] corr;
  int checks = 0, failures = 0;

  carry_suppressor dut (.cn(cn), .pn(pn), .pp(pp), .cp(cp), .corr(corr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_v;
      {cn, pn, pp, cp} = 4'(v);
      #1;
      exp_v = (cn || (pn && pp && cp)) ? 1 : 0;
      checks++;
      if (int'(corr) != 6 * exp_v + int'(cp)) begin
        failures++;
        $display("FAIL cn=%b pn=%b pp=%b cp=%b corr=%0d", cn, pn, pp, cp, corr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
