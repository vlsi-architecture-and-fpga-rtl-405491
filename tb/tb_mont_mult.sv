// tb_mont_mult: checks MM(X, Y, N) for every ICE S-box modulus N with random X, Y of
// degree below 8 and with the corner values 0, 1, x^8 terms: the result must have degree
// below 8 and satisfy MM * x^9 = X * Y (mod N), worked out by shift-and-reduce.
module tb_mont_mult;
  import ice_ref_pkg::*;
  logic [8:0] x, y, n, a;
  int checks = 0, failures = 0;
  mont_mult #(.N_BITS(9)) dut (.x(x), .y(y), .n(n), .a(a));

  function automatic int mulx9(int v, int m);
    for (int i = 0; i < 9; i++) begin
      v = v << 1;
      if (v >= 256) v ^= m;
    end
    return v;
  endfunction

  task automatic check(int xv, int yv, int nv);
    int lhs, rhs;
    x = 9'(xv); y = 9'(yv); n = 9'(nv);
    #1;
    lhs = mulx9(int'(a), nv);
    rhs = gf_mul(xv % 256 == xv ? xv : (xv ^ nv), yv % 256 == yv ? yv : (yv ^ nv), nv);
    checks += 2;
    if (a[8] !== 1'b0) begin failures++; $display("FAIL degree a=%h", a); end
    if (lhs != rhs) begin
      failures++;
      $display("FAIL x=%h y=%h n=%0d a=%h (a*x^9=%h, x*y=%h)", xv, yv, nv, a, lhs, rhs);
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++)
      for (int r = 0; r < 4; r++) begin
        int m;
        m = ref_mod(s, r);
        check(0, 0, m); check(1, 1, m); check(255, 255, m); check(0, 77, m);
        for (int t = 0; t < 200; t++) check(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)), m);
        for (int t = 0; t < 20; t++) check(int'($urandom_range(0, 511)), int'($urandom_range(0, 255)), m);
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
