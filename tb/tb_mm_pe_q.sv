// tb_mm_pe_q: exhaustive check of the Q-calc element: q = s0 xor x*y0, and its own sum bit
// is zero whenever the modulus bit n0 is 1.
module tb_mm_pe_q;
  logic xi, yi, ni, si, qo, so;
  logic q_exp, s_exp;
  int checks = 0, failures = 0;
  mm_pe_q dut (.*);
  initial begin
    for (int v = 0; v < 16; v++) begin
      {xi, yi, ni, si} = 4'(v);
      #1;
      q_exp = si ^ (xi & yi);
      s_exp = si ^ (xi & yi) ^ (q_exp & ni);
      checks += 2;
      if (qo !== q_exp) begin failures++; $display("FAIL q v=%0d", v); end
      if (so !== s_exp) begin failures++; $display("FAIL s v=%0d", v); end
      if (ni) begin
        checks++;
        if (so !== 1'b0) begin failures++; $display("FAIL s not zero v=%0d", v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
