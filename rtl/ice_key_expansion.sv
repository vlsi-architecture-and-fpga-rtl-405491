// ice_key_expansion: ICE (level 1) key schedule, one 60-bit subkey per clock cycle.
//
// The 64-bit key is held as four 16-bit words kb[3..0] (kb[3] = key[63:48]). Subkey i is
// built from 15 bit-steps; step j takes bit j of the words kb[(KEYROT[i]+k) mod 4],
// k = 0..3, in that order, and shifts them into field j mod 3 (field 0 is k0, field 1 is
// k1, field 2 is the permutation key), so the first bit taken ends up as the field's MSB.
// Each word gives up its 15 low bits per subkey, and every bit taken is put back,
// complemented, at the top of its word: after one subkey a word w becomes
// {~w[14:0], w[15]}. All 60 bits of a subkey are therefore plain wiring from the word
// registers, and the unit writes RAM address i in cycle i.
// Interface: a one-cycle load pulse captures key; during the next 16 cycles we is high and
// waddr counts 0..15; done is high during the cycle of the last write (address 15).
//
// The design description only asks for the ICE key schedule and a RAM written once per
// round; producing one subkey per cycle from rotating word registers is this design's
// own choice.
module ice_key_expansion
  import ice_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  block_t  key,
  output logic    busy,
  output logic    done,
  output logic    we,
  output logic [3:0] waddr,
  output subkey_t wdata
);
  logic [15:0] kb [4];
  logic [3:0]  cnt;
  logic [19:0] val [3];
  logic [1:0]  kr;

  always_comb begin
    kr = KEYROT[cnt];
    for (int r = 0; r < 3; r++)
      for (int jj = 0; jj < 5; jj++)
        for (int k = 0; k < 4; k++)
          val[r][19 - (4*jj + k)] = kb[2'(kr + 2'(k))][r + 3*jj];
    // ICE names the fields val[0] (salts the left half), val[1] (right half), val[2] (perm).
    wdata = '{perm: val[2], k0: val[0], k1: val[1]};
    we    = busy;
    waddr = cnt;
    done  = busy && (cnt == 4'd15);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      for (int m = 0; m < 4; m++) kb[m] <= '0;
    end else begin
      if (load) begin
        kb[3] <= key[63:48];
        kb[2] <= key[47:32];
        kb[1] <= key[31:16];
        kb[0] <= key[15:0];
        cnt   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        for (int m = 0; m < 4; m++) kb[m] <= {~kb[m][14:0], kb[m][15]};
        cnt <= cnt + 4'd1;
        if (cnt == 4'd15) busy <= 1'b0;
      end
    end
  end
endmodule
