// tb_ice_top: end-to-end test of the ICE engine at its default size.
//
// Runs the ICE test vector (key deadbeef01234567, plaintext fedcba9876543210, ciphertext
// 7d6ef1ef30d47a96) both ways, then random keys and blocks in both modes against the
// reference model, single and back-to-back. A monitor checks every output against the
// expected value queued at the start, the 16-cycle start-to-capture latency and the
// 16-cycle spacing of back-to-back results. Counted mechanisms, each of which must occur:
// key expansion, encryption, decryption, back-to-back start in the last round, mode switch
// between chained blocks, key load refused while busy, start refused without a key.
module tb_ice_top;
  import ice_pkg::*;
  import ice_ref_pkg::*;

  logic   clk = 0, rst_n = 0, key_load = 0, start = 0, decrypt = 0;
  block_t key = '0, din = '0, dout;
  logic   key_ready, ready, busy, dout_valid;

  ice_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_keyx = 0, n_enc = 0, n_dec = 0, n_b2b = 0, n_switch = 0, n_key_refused = 0,
      n_start_refused = 0;
  block_t exp_q [$];
  int     start_q [$];
  int     last_valid_cyc = -100;
  bit     last_dec = 0, have_prev = 0;
  logic [63:0] cur_key;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Monitor: samples at each rising edge.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && start && ready) begin
      exp_q.push_back(ref_cipher(cur_key, din, decrypt));
      start_q.push_back(cyc);
      if (decrypt) n_dec++; else n_enc++;
      if (busy) begin
        n_b2b++;
        if (decrypt != last_dec) n_switch++;
      end
      last_dec <= decrypt;
    end
    if (rst_n && start && !ready && !busy) n_start_refused++;
    if (rst_n && key_load && busy) n_key_refused++;
    if (rst_n && dout_valid) begin
      block_t e;
      int s;
      chk(exp_q.size() > 0, "output without a pending block");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        s = start_q.pop_front();
        chk(dout == e, $sformatf("dout %h expected %h", dout, e));
        // loaded at edge s, captured at edge s+16, seen valid at edge s+17
        chk(cyc - s == 17, $sformatf("latency %0d cycles", cyc - s - 1));
        if (cyc - last_valid_cyc < 17 && have_prev)
          chk(cyc - last_valid_cyc == 16, "back-to-back spacing 16 cycles");
        last_valid_cyc <= cyc;
        have_prev = 1;
      end
    end
  end

  task automatic load_key(logic [63:0] k);
    int w = 0;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    cur_key = k;
    chk(!key_ready, "key_ready cleared by key load");
    while (!key_ready && w < 40) begin @(negedge clk); w++; end
    chk(key_ready, "key_ready after expansion");
    chk(w == 16, $sformatf("key expansion took %0d cycles", w));  // load edge to key_ready
    n_keyx++;
  endtask

  // One block: wait for ready, start it, optionally do not wait for its end.
  task automatic issue(logic [63:0] d, bit dec);
    while (!ready) @(negedge clk);
    start = 1; din = d; decrypt = dec;
    @(negedge clk);
    start = 0;
  endtask

  task automatic drain();
    int w = 0;
    while ((busy || exp_q.size() > 0) && w < 100) begin @(negedge clk); w++; end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // start before any key: must be ignored
    start = 1; din = 64'h1;
    @(negedge clk);
    start = 0;
    chk(!busy, "no block started without key");

    load_key(64'hdeadbeef01234567);
    issue(64'hfedcba9876543210, 0);
    // key load while busy must be refused
    @(negedge clk);
    key_load = 1; key = 64'h0;
    @(negedge clk);
    key_load = 0;
    drain();
    chk(key_ready, "key kept after refused load");
    chk(dout == 64'h7d6ef1ef30d47a96, $sformatf("ICE test vector: %h", dout));
    issue(64'h7d6ef1ef30d47a96, 1);
    drain();
    chk(dout == 64'hfedcba9876543210, $sformatf("ICE test vector decrypt: %h", dout));

    for (int k = 0; k < 4; k++) begin
      logic [63:0] pt [6];
      load_key({$urandom, $urandom});
      for (int i = 0; i < 6; i++) pt[i] = {$urandom, $urandom};
      // single blocks
      issue(pt[0], 0); drain();
      issue(pt[1], 1); drain();
      // back-to-back blocks with alternating and repeated modes
      for (int i = 0; i < 6; i++) issue(pt[i], (i % 3) == 2);
      drain();
      // round trip through the hardware in both directions
      issue(pt[0], 0); drain();
      issue(dout, 1); drain();
      chk(dout == pt[0], "encrypt then decrypt returns the plaintext");
    end

    chk(exp_q.size() == 0, "all blocks came out");
    chk(n_keyx > 0, "key expansion happened");
    chk(n_enc > 0, "encryption happened");
    chk(n_dec > 0, "decryption happened");
    chk(n_b2b > 0, "back-to-back start happened");
    chk(n_switch > 0, "mode switch between chained blocks happened");
    chk(n_key_refused > 0, "key load refused while busy");
    chk(n_start_refused > 0, "start refused without key");
    $display("mechanisms: key_expansion=%0d encrypt=%0d decrypt=%0d back_to_back=%0d mode_switch=%0d key_refused=%0d start_refused=%0d",
             n_keyx, n_enc, n_dec, n_b2b, n_switch, n_key_refused, n_start_refused);
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
