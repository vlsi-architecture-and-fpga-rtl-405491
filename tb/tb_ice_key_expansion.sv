// tb_ice_key_expansion: loads several keys (including the standard test key
// deadbeef01234567) and checks that exactly 16 writes follow, to addresses 0..15 in order,
// with the subkeys of the bit-serial reference schedule, and that done pulses once, 16
// cycles after the load, together with the last write.
module tb_ice_key_expansion;
  import ice_pkg::*;
  import ice_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, busy, done, we;
  logic [3:0] waddr;
  block_t key;
  subkey_t wdata;
  int checks = 0, failures = 0;
  ice_key_expansion dut (.*);
  always #5 clk = ~clk;

  task automatic run_key(logic [63:0] k);
    ref_sched_t ks = ref_key_schedule(k);
    int writes = 0, cyc = 0;
    @(negedge clk);
    key = k; load = 1;
    @(negedge clk);
    load = 0;
    while (cyc < 18) begin
      checks++;
      if (done !== (cyc == 15)) begin failures++; $display("FAIL done=%b in cycle %0d", done, cyc); end
      if (we) begin
        checks += 2;
        if (int'(waddr) != writes) begin failures++; $display("FAIL addr %0d != %0d", waddr, writes); end
        if (wdata !== subkey_t'(ks[writes])) begin
          failures++;
          $display("FAIL key %h sub %0d: %h exp %h", k, writes, wdata, ks[writes]);
        end
        writes++;
      end
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (writes != 16) begin failures++; $display("FAIL %0d writes", writes); end
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_key(64'hdeadbeef01234567);
    run_key(64'h0000000000000000);
    run_key(64'hffffffffffffffff);
    for (int t = 0; t < 6; t++) run_key({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
