// tb_group_cla: the group carry out of a 4-digit and an 8-digit group CLA is
// compared with a digit-by-digit ripple c = CG | P.c over all 2^9 (4 digits)
// and 2^17 (8 digits) combinations of CG, P and carry in. CP is randomised and
// must not matter.
module tb_group_cla;
  import bcd_pkg::*;

  digit_pg_t [3:0] pg4;
  digit_pg_t [7:0] pg8;
  logic cin, cout4, cout8;
  int checks = 0, failures = 0;

  group_cla #(.GROUP_DIGITS(4)) dut4 (.pg(pg4), .cin(cin), .cout(cout4));
  group_cla #(.GROUP_DIGITS(8)) dut8 (.pg(pg8), .cin(cin), .cout(cout8));

  function automatic logic ripple(logic [7:0] g, logic [7:0] p, logic c, int n);
    for (int k = 0; k < n; k++) c = g[k] | (p[k] & c);
    return c;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic [7:0] g, p;
      {cin, g, p} = 17'(v);
      for (int k = 0; k < 8; k++) begin
        pg8[k] = '{cg: g[k], cp: 1'($urandom), p: p[k]};
        if (k < 4) pg4[k] = pg8[k];
      end
      #1;
      checks++;
      if (cout8 !== ripple(g, p, cin, 8)) begin
        failures++;
        $display("FAIL8 g=%b p=%b cin=%b got %b", g, p, cin, cout8);
      end
      if (v[7:4] == 4'd0 && v[15:12] == 4'd0) begin
        checks++;
        if (cout4 !== ripple(g, p, cin, 4)) begin
          failures++;
          $display("FAIL4 g=%b p=%b cin=%b got %b", g[3:0], p[3:0], cin, cout4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
