// tb_mm_pe: exhaustive check of the basic Montgomery array element (all 32 input
// combinations) against s xor x*y xor q*n.
module tb_mm_pe;
  logic xi, yi, ni, qi, si, so;
  int checks = 0, failures = 0;
  mm_pe dut (.*);
  initial begin
    for (int v = 0; v < 32; v++) begin
      {xi, yi, ni, qi, si} = 5'(v);
      #1;
      checks++;
      if (so !== (si ^ (xi & yi) ^ (qi & ni))) begin
        failures++;
        $display("FAIL v=%0d so=%b", v, so);
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
