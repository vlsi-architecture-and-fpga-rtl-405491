// tb_ice_subkey_ram: fills all 16 words with random data, reads them back in random order
// through the asynchronous port (same-cycle data), and checks that a write to one word
// leaves the others untouched.
module tb_ice_subkey_ram;
  logic clk = 0, we = 0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [59:0] wdata = '0, rdata;
  logic [59:0] model [16];
  int checks = 0, failures = 0;
  ice_subkey_ram #(.DEPTH(16), .WIDTH(60)) dut (.*);
  always #5 clk = ~clk;

  task automatic write(int a, logic [59:0] d);
    @(negedge clk);
    we = 1; waddr = 4'(a); wdata = d;
    @(negedge clk);
    we = 0;
    model[a] = d;
  endtask

  task automatic read_all();
    for (int i = 0; i < 16; i++) begin
      int a = (i * 7 + 3) % 16;
      raddr = 4'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d %h exp %h", a, rdata, model[a]); end
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) write(i, {$urandom, $urandom} & 60'hfffffffffffffff);
    read_all();
    write(5, 60'h123456789abcdef);
    read_all();
    write(15, '1);
    write(0, '0);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
