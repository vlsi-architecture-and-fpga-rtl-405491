// ice_top: folded (feedback) ICE encryption/decryption engine.
//
// Data path: a 64-bit input register feeds one combinational ICE transformation round,
// whose output is fed back into the input register for 16 rounds; after the 16th round the
// output register stores the result with its halves exchanged. Subkeys come from a 16 x 60
// RAM with asynchronous read, filled by the key expansion unit one subkey per cycle.
// Decryption is the same pass with the RAM read in reverse order.
//
// Interface and timing:
//   key_load (pulse, with key) -> 16 cycles of subkey writes -> key_ready goes high.
//   start (with din, decrypt) accepted when ready: edge t loads din, edges t+1..t+16 run the
//   rounds, dout_valid pulses after edge t+16 with dout. A start in the cycle where
//   ready is high during the last round overlaps the next block with the capture, giving
//   16 cycles per 64-bit block (64 bits x 29.1 MHz / 16 = 116 Mbit/s at the reported clock).
//   key_load is ignored while busy; start is ignored until key_ready.
//
// The block structure (key expansion, subkey RAM, input register, one transformation round
// with feedback, output register) follows the design description; the ports and the
// handshake are this design's own choices.
module ice_top
  import ice_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key,
  output logic   key_ready,
  input  logic   start,
  input  logic   decrypt,
  input  block_t din,
  output logic   ready,
  output logic   busy,
  output block_t dout,
  output logic   dout_valid
);
  logic    key_start, key_done, key_busy, ram_we;
  logic    load_ext, load_fb, capture;
  logic [3:0] waddr, raddr;
  subkey_t wkey, rkey;
  block_t  state, round_out;

  ice_ctrl #(.ROUNDS(ROUNDS)) u_ctrl (
    .clk, .rst_n, .start, .decrypt, .key_load, .key_done,
    .key_start, .key_ready, .ready, .busy,
    .load_ext, .load_fb, .capture, .raddr
  );

  ice_key_expansion u_keyx (
    .clk, .rst_n, .load(key_start), .key,
    .busy(key_busy), .done(key_done), .we(ram_we), .waddr, .wdata(wkey)
  );

  ice_subkey_ram #(.DEPTH(ROUNDS), .WIDTH(SUBKEY_BITS)) u_ram (
    .clk, .we(ram_we), .waddr, .wdata(wkey), .raddr, .rdata(rkey)
  );

  ice_input_reg u_inreg (
    .clk, .rst_n, .load_ext, .din, .load_fb, .fb(round_out), .q(state)
  );

  ice_round u_round (.din(state), .sk(rkey), .dout(round_out));

  ice_output_reg u_outreg (
    .clk, .rst_n, .capture, .d(round_out), .q(dout), .valid(dout_valid)
  );

  a_no_ram_write_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
      !(ram_we && busy)) else $error("subkey RAM written while a block is in flight");
  a_ready_needs_key: assert property (@(posedge clk) disable iff (!rst_n)
      !(ready && key_busy)) else $error("ready during key expansion");
endmodule
