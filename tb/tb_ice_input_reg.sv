// tb_ice_input_reg: checks reset to zero, external load, feedback load, hold, and the
// priority of the external load over the feedback.
module tb_ice_input_reg;
  import ice_pkg::*;
  logic clk = 0, rst_n = 0, load_ext = 0, load_fb = 0;
  block_t din = '0, fb = '0, q, exp;
  int checks = 0, failures = 0;
  ice_input_reg dut (.*);
  always #5 clk = ~clk;

  task automatic step(bit le, bit lf);
    din = {$urandom, $urandom};
    fb  = {$urandom, $urandom};
    load_ext = le; load_fb = lf;
    if (le) exp = din;
    else if (lf) exp = fb;
    @(negedge clk);
    checks++;
    if (q !== exp) begin failures++; $display("FAIL le=%b lf=%b q=%h exp=%h", le, lf, q, exp); end
  endtask

  initial begin
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    exp = '0;
    for (int t = 0; t < 200; t++) step(1'($urandom), 1'($urandom));
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
