// cpv_tb_pkg: stimulus helpers shared by the testbenches.
//
// Pad hits are a fixed function of (seed, event, card, chip, channel), so a
// card model can produce them and a testbench can predict them without any
// shared state. occ is the hit probability in 1/256 units.
package cpv_tb_pkg;
  import cpv_pkg::*;

  function automatic logic [31:0] mix(int unsigned seed, int unsigned ev, int unsigned card,
                                      int unsigned chip, int unsigned ch);
    logic [31:0] h;
    h = seed ^ (ev * 32'h9E37_79B1) ^ (card * 32'h85EB_CA77) ^ (chip * 32'hC2B2_AE3D)
        ^ (ch * 32'h27D4_EB2F);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  function automatic bit pad_hit(int unsigned seed, int unsigned ev, int unsigned card,
                                 int unsigned chip, int unsigned ch, int unsigned occ);
    logic [31:0] h;
    h = mix(seed, ev, card, chip, ch);
    return int'(h[31:24]) < occ;
  endfunction

  function automatic dl_word_t pad_word(int unsigned seed, int unsigned ev, int unsigned card,
                                        int unsigned chip, int unsigned ch);
    logic [31:0] h;
    h = mix(seed, ev, card, chip, ch);
    return {DL_ADDR_W'(ch), h[DL_AMP_W-1:0]};
  endfunction

  // Number of words a card gives for one event.
  function automatic int unsigned card_words(int unsigned seed, int unsigned ev,
                                             int unsigned card, int unsigned occ);
    int unsigned n = 0;
    for (int unsigned c = 0; c < DL_CHIPS; c++)
      for (int unsigned ch = 0; ch < CH_PER_CHIP; ch++)
        if (pad_hit(seed, ev, card, c, ch, occ)) n++;
    return n;
  endfunction

  // The i-th word of a card for one event, in readout order.
  function automatic dl_word_t card_word(int unsigned seed, int unsigned ev,
                                         int unsigned card, int unsigned occ, int unsigned idx);
    int unsigned n = 0;
    for (int unsigned c = 0; c < DL_CHIPS; c++)
      for (int unsigned ch = 0; ch < CH_PER_CHIP; ch++)
        if (pad_hit(seed, ev, card, c, ch, occ)) begin
          if (n == idx) return pad_word(seed, ev, card, c, ch);
          n++;
        end
    return '0;
  endfunction

  // Reference CRC by polynomial long division (see crc32_d32 for the
  // convention): first 32 message bits inverted, 32 zero bits appended.
  function automatic logic [31:0] ref_crc(logic [31:0] msg[$]);
    bit bits[$];
    bit [32:0] poly = 33'h1_04C1_1DB7;
    bit [31:0] rem;
    foreach (msg[i]) for (int b = 31; b >= 0; b--) bits.push_back(msg[i][b]);
    if (bits.size() == 0) return 32'hFFFF_FFFF;
    for (int i = 0; i < 32; i++) bits[i] = !bits[i];
    for (int i = 0; i < 32; i++) bits.push_back(1'b0);
    for (int i = 0; i + 32 < bits.size(); i++)
      if (bits[i]) for (int j = 0; j <= 32; j++) bits[i + j] ^= poly[32 - j];
    for (int j = 0; j < 32; j++) rem[31 - j] = bits[bits.size() - 32 + j];
    return rem;
  endfunction
endpackage
