// tb_gf_pow7: exhaustive check of A^7 mod P for all 256 bases and every distinct ICE S-box
// modulus, against repeated shift-and-reduce multiplication. R' = x^18 mod P is worked
// out here by shifting.
module tb_gf_pow7;
  import ice_ref_pkg::*;
  logic [7:0] a, y;
  logic [8:0] p, r2;
  int checks = 0, failures = 0;
  gf_pow7 #(.N_BITS(9)) dut (.a(a), .p(p), .r2(r2), .y(y));

  initial begin
    for (int s = 0; s < 4; s++)
      for (int r = 0; r < 4; r++) begin
        int m, rr;
        m = ref_mod(s, r);
        rr = 1;
        for (int i = 0; i < 18; i++) begin
          rr = rr << 1;
          if (rr >= 256) rr ^= m;
        end
        p = 9'(m); r2 = 9'(rr);
        for (int v = 0; v < 256; v++) begin
          a = 8'(v);
          #1;
          checks++;
          if (int'(y) != gf_exp7(v, m)) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d a=%0d y=%0d exp=%0d", m, v, y, gf_exp7(v, m));
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
