// tb_ice_ctrl: drives the sequencer through a key load, an encryption, a decryption and two
// back-to-back blocks, and checks the RAM address sequence (0..15 forward, 15..0 reverse),
// 15 feedback loads, one capture 16 cycles after the start, key_ready and the rejection of
// a key load while a block is in flight.
module tb_ice_ctrl;
  logic clk = 0, rst_n = 0, start = 0, decrypt = 0, key_load = 0, key_done = 0;
  logic key_start, key_ready, ready, busy, load_ext, load_fb, capture;
  logic [3:0] raddr;
  int checks = 0, failures = 0;
  ice_ctrl #(.ROUNDS(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Follows one block from its start cycle; chains a new start in the last round if asked.
  task automatic run_block(bit dec, bit chain, bit chain_dec);
    int fb = 0;
    chk(ready, "ready before start");
    start = 1; decrypt = dec;
    #1 chk(load_ext, "load_ext on start");
    @(negedge clk);
    start = 0;
    for (int r = 0; r < 16; r++) begin
      chk(busy, "busy in round");
      chk(int'(raddr) == (dec ? 15 - r : r), $sformatf("raddr round %0d = %0d", r, raddr));
      if (r == 3) begin
        key_load = 1;
        #1 chk(!key_start, "key load rejected while busy");
      end
      if (r == 15) begin
        chk(capture && !load_fb, "capture in round 15");
        if (chain) begin
          start = 1; decrypt = chain_dec;
          #1 chk(load_ext, "chained start accepted in last round");
        end
      end else begin
        chk(!capture, "no early capture");
        if (load_fb) fb++;
      end
      @(negedge clk);
      key_load = 0; start = 0;
    end
    chk(fb == 15, $sformatf("%0d feedback loads", fb));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!key_ready && !ready, "not ready before key");
    start = 1;
    #1 chk(!load_ext, "start ignored without key");
    @(negedge clk);
    start = 0;
    key_load = 1;
    #1 chk(key_start, "key load accepted when idle");
    @(negedge clk);
    key_load = 0;
    repeat (15) @(negedge clk);
    key_done = 1;
    @(negedge clk);
    key_done = 0;
    chk(key_ready && ready && !busy, "ready after key done");
    run_block(0, 0, 0);
    chk(!busy, "idle after block");
    run_block(1, 0, 0);
    run_block(0, 1, 1);
    // the chained decryption block is already running: follow it
    for (int r = 0; r < 16; r++) begin
      chk(int'(raddr) == 15 - r, "chained block reverse order");
      @(negedge clk);
    end
    chk(!busy, "idle at end");
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
