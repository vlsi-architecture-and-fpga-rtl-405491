// tb_ice_f: random inputs and subkeys through the F function, compared with the reference
// model; includes all-zero and all-one permutation keys.
module tb_ice_f;
  import ice_pkg::*;
  import ice_ref_pkg::*;
  half_t   r, f;
  subkey_t sk;
  int checks = 0, failures = 0;
  ice_f dut (.r(r), .sk(sk), .f(f));
  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [31:0] exp;
      r = $urandom;
      sk = {$urandom, $urandom} & 60'hfffffffffffffff;
      if (t % 4 == 1) sk.perm = '0;
      if (t % 4 == 2) sk.perm = '1;
      #1;
      exp = ref_f(r, ref_subkey_t'(sk));
      checks++;
      if (f !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL r=%h sk=%h f=%h exp=%h", r, sk, f, exp);
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
