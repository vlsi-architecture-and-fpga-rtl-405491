// ice_ctrl: sequencer of the folded ICE engine.
//
// A 4-bit round counter steps through the 16 rounds, one per cycle. The RAM read address
// is the round number when encrypting and 15 minus it when decrypting (subkeys in reverse
// order). A start accepted while idle, or in the last round of the previous block, loads
// the input register (load_ext); in rounds 0..14 the round output is fed back (load_fb); in
// round 15 it goes to the output register (capture). Blocks can thus follow each other
// every 16 cycles. A key load is accepted only while no block is in flight and clears
// key_ready until the key expansion unit reports done; start is accepted only with
// key_ready. If start and key_load come together while idle, start wins.
//
// The round sequence and the reverse subkey order for decryption follow the design
// description; the handshake, the back-to-back start and the key-load rules are this
// design's own choices, since no controller is described.
module ice_ctrl #(
  parameter int unsigned ROUNDS = 16,
  localparam int unsigned RW    = $clog2(ROUNDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          decrypt,
  input  logic          key_load,
  input  logic          key_done,
  output logic          key_start,  // pass key_load on to the key expansion unit
  output logic          key_ready,
  output logic          ready,
  output logic          busy,
  output logic          load_ext,
  output logic          load_fb,
  output logic          capture,
  output logic [RW-1:0] raddr
);
  logic          running, dec, last, start_ok;
  logic [RW-1:0] rnd;

  always_comb begin
    last      = running && (rnd == RW'(ROUNDS - 1));
    ready     = key_ready && (!running || last);
    start_ok  = start && ready;
    key_start = key_load && !running && !start_ok;
    load_ext  = start_ok;
    load_fb   = running && !last;
    capture   = last;
    raddr     = dec ? RW'(ROUNDS - 1) - rnd : rnd;
    busy      = running;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      dec       <= 1'b0;
      rnd       <= '0;
      key_ready <= 1'b0;
    end else begin
      if (key_start)     key_ready <= 1'b0;
      else if (key_done) key_ready <= 1'b1;
      if (start_ok) begin
        running <= 1'b1;
        dec     <= decrypt;
        rnd     <= '0;
      end else if (running) begin
        if (last) running <= 1'b0;
        rnd <= rnd + 1'b1;
      end
    end
  end

  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(load_ext && load_fb))
    else $error("input register loaded from both sources");
  a_nokey: assert property (@(posedge clk) disable iff (!rst_n) !(key_start && running))
    else $error("key load accepted while a block is in flight");
endmodule
