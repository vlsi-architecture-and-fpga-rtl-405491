// tb_ice_throughput: streaming workload for the ICE engine at its default size.
//
// Expands one random key, then keeps start high so that 48 random plaintext blocks enter
// back to back, and afterwards streams the 48 ciphertexts back through in decrypt mode.
// Every ciphertext is compared with the reference model and every decrypted block with its
// plaintext. The time from the first accepted start to the last result must be exactly
// 16 cycles per block (plus the final capture), i.e. 4 bits per cycle; the rate at the
// reported 29.1 MHz clock is printed.
module tb_ice_throughput;
  import ice_pkg::*;
  import ice_ref_pkg::*;

  localparam int NBLK = 48;

  logic   clk = 0, rst_n = 0, key_load = 0, start = 0, decrypt = 0;
  block_t key = '0, din = '0, dout;
  logic   key_ready, ready, busy, dout_valid;
  ice_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [63:0] pt [NBLK], ct [NBLK], got [NBLK];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Streams NBLK blocks with start held high; returns the cycles from the first accept
  // to the last valid result.
  task automatic stream(bit dec, output int cycles);
    int issued = 0, received = 0, cyc = 0;
    bit started = 0;
    decrypt = dec;
    while (received < NBLK && cyc < 40 * NBLK) begin
      start = (issued < NBLK);
      din = dec ? ct[issued % NBLK] : pt[issued % NBLK];
      @(posedge clk);
      if (start && ready) begin issued++; started = 1; end
      if (dout_valid) begin got[received] = dout; received++; end
      if (started) cyc++;
      @(negedge clk);
    end
    start = 0;
    cycles = cyc - 2;  // edges from the first load to the last capture
    chk(received == NBLK, $sformatf("%0d of %0d blocks out", received, NBLK));
  endtask

  initial begin
    int c_enc, c_dec;
    logic [63:0] k;
    k = {$urandom, $urandom};
    for (int i = 0; i < NBLK; i++) pt[i] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    while (!key_ready) @(negedge clk);

    stream(0, c_enc);
    for (int i = 0; i < NBLK; i++) begin
      ct[i] = got[i];
      chk(got[i] == ref_cipher(k, pt[i], 0), $sformatf("ciphertext %0d", i));
    end
    repeat (3) @(negedge clk);
    stream(1, c_dec);
    for (int i = 0; i < NBLK; i++) chk(got[i] == pt[i], $sformatf("decrypted block %0d", i));

    chk(c_enc == 16 * NBLK, $sformatf("encrypt stream took %0d cycles", c_enc));
    chk(c_dec == 16 * NBLK, $sformatf("decrypt stream took %0d cycles", c_dec));
    $display("%0d blocks: %0d cycles encrypting, %0d decrypting; %0.1f Mbit/s at 29.1 MHz",
             NBLK, c_enc, c_dec, 64.0 * NBLK / real'(c_enc) * 29.1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
