// tb_ice_sbox: exhaustive check of all four S-boxes (4 x 1024 inputs) against the
// reference S-box model.
module tb_ice_sbox;
  import ice_ref_pkg::*;
  logic [9:0] x;
  logic [7:0] y [4];
  int checks = 0, failures = 0;
  ice_sbox #(.SBOX(0)) u0 (.x(x), .y(y[0]));
  ice_sbox #(.SBOX(1)) u1 (.x(x), .y(y[1]));
  ice_sbox #(.SBOX(2)) u2 (.x(x), .y(y[2]));
  ice_sbox #(.SBOX(3)) u3 (.x(x), .y(y[3]));
  initial begin
    for (int v = 0; v < 1024; v++) begin
      x = 10'(v);
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(y[s]) != ref_sbox(s, v)) begin
          failures++;
          if (failures < 10) $display("FAIL S%0d x=%h y=%h exp=%h", s + 1, v, y[s], ref_sbox(s, v));
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
