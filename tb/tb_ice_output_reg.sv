// tb_ice_output_reg: checks that a capture stores the halves exchanged, that valid pulses
// for exactly the cycle after a capture, and that data holds otherwise.
module tb_ice_output_reg;
  import ice_pkg::*;
  logic clk = 0, rst_n = 0, capture = 0, valid;
  block_t d = '0, q, exp = '0;
  int checks = 0, failures = 0;
  ice_output_reg dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      d = {$urandom, $urandom};
      capture = 1'($urandom);
      if (capture) exp = {d[31:0], d[63:32]};
      @(negedge clk);
      checks += 2;
      if (q !== exp) begin failures++; $display("FAIL q=%h exp=%h", q, exp); end
      if (valid !== capture) begin failures++; $display("FAIL valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
