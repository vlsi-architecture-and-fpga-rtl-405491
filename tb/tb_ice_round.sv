// tb_ice_round: random blocks and subkeys through one round, compared with
// {R, L xor F(R, K)} from the reference model.
module tb_ice_round;
  import ice_pkg::*;
  import ice_ref_pkg::*;
  block_t  din, dout;
  subkey_t sk;
  int checks = 0, failures = 0;
  ice_round dut (.din(din), .sk(sk), .dout(dout));
  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [63:0] exp;
      din = {$urandom, $urandom};
      sk  = {$urandom, $urandom} & 60'hfffffffffffffff;
      #1;
      exp = {din[31:0], din[63:32] ^ ref_f(din[31:0], ref_subkey_t'(sk))};
      checks++;
      if (dout !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h dout=%h exp=%h", din, dout, exp);
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
