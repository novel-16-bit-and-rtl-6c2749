// tb_ks_carry_network: every digit carry of the Kogge-Stone network is
// compared with a ripple c[k] = CG[k] | CP[k].c[k-1], exhaustively over CG, CP
// and carry in for 4 digits and 8 digits, and at random for a 5-digit network
// (a size that is not a power of two). P is randomised and must not matter.
module tb_ks_carry_network;
  import bcd_pkg::*;

  digit_pg_t [3:0] pg4;
  digit_pg_t [7:0] pg8;
  digit_pg_t [4:0] pg5;
  logic cin;
  logic [3:0] c4;
  logic [7:0] c8;
  logic [4:0] c5;
  int checks = 0, failures = 0;

  ks_carry_network #(.GROUP_DIGITS(4)) dut4 (.pg(pg4), .cin(cin), .carry(c4));
  ks_carry_network #(.GROUP_DIGITS(8)) dut8 (.pg(pg8), .cin(cin), .carry(c8));
  ks_carry_network #(.GROUP_DIGITS(5)) dut5 (.pg(pg5), .cin(cin), .carry(c5));

  function automatic logic [7:0] ripple(logic [7:0] g, logic [7:0] p, logic c, int n);
    logic [7:0] r = '0;
    for (int k = 0; k < n; k++) begin
      c = g[k] | (p[k] & c);
      r[k] = c;
    end
    return r;
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
        pg8[k] = '{cg: g[k], cp: p[k], p: 1'($urandom)};
        if (k < 4) pg4[k] = pg8[k];
        if (k < 5) pg5[k] = pg8[k];
      end
      #1;
      checks++;
      if (c8 !== ripple(g, p, cin, 8)) begin
        failures++;
        $display("FAIL8 g=%b p=%b cin=%b got %b", g, p, cin, c8);
      end
      if (v[7:4] == 4'd0 && v[15:12] == 4'd0) begin
        checks++;
        if (c4 !== ripple(g, p, cin, 4)[3:0]) begin
          failures++;
          $display("FAIL4 g=%b p=%b cin=%b got %b", g[3:0], p[3:0], cin, c4);
        end
      end
      if (v[7:5] == 3'd0 && v[15:13] == 3'd0) begin
        checks++;
        if (c5 !== ripple(g, p, cin, 5)[4:0]) begin
          failures++;
          $display("FAIL5 g=%b p=%b cin=%b got %b", g[4:0], p[4:0], cin, c5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
