// tb_mac_ref: reference model shared by the testbenches.
//
// It computes CRCs with the textbook LFSR formulation (feedback = incoming bit
// XOR register MSB), which gives the same remainder as long division with W
// zeros appended but is written independently of the RTL's shift/XOR engine,
// and it assembles complete 64-byte frames byte by byte from the header
// fields and a payload.
package tb_mac_ref;
  import mac_pkg::*;

  typedef logic [7:0] frame_t [FRAME_BYTES];
  typedef logic [7:0] payload_t [PAYLOAD_BYTES];

  // CRC of the first nbits bits (MSB first) of the byte array.
  function automatic logic [15:0] ref_crc(input logic [7:0] b [], input int nbits,
                                          input int w, input logic [16:0] poly);
    logic [15:0] c = '0;
    logic [15:0] lowp = poly[15:0];
    for (int i = 0; i < nbits; i++) begin
      logic bit_i = b[i/8][7 - (i%8)];
      logic fb    = bit_i ^ c[w-1];
      c = c << 1;
      if (fb) c = c ^ lowp;
    end
    if (w < 16) c = c & ((16'h1 << w) - 1);
    return c;
  endfunction

  function automatic frame_t make_frame(input addr_t src, input addr_t dst, input ftype_e t,
                                        input mode_e m, input seq_t s, input payload_t pl);
    frame_t f;
    logic [7:0] hb [];
    logic [7:0] pb [];
    logic [13:0] hc;
    logic [15:0] pc;
    hb = new[5];
    hb[0] = src[11:4];
    hb[1] = {src[3:0], dst[11:8]};
    hb[2] = dst[7:0];
    hb[3] = {t, m, s[3:2]};
    hb[4] = {s[1:0], 6'b0};
    hc = 14'(ref_crc(hb, 34, 14, {2'b0, HCRC_POLY}));
    for (int i = 0; i < 4; i++) f[i] = hb[i];
    f[4] = {s[1:0], hc[13:8]};
    f[5] = hc[7:0];
    if (t == FT_DATA) begin
      pb = new[PAYLOAD_BYTES];
      for (int i = 0; i < PAYLOAD_BYTES; i++) pb[i] = pl[i];
      pc = ref_crc(pb, PAYLOAD_BYTES * 8, 16, PCRC_POLY);
      f[6] = pc[15:8];
      f[7] = pc[7:0];
      for (int i = 0; i < PAYLOAD_BYTES; i++) f[8+i] = pl[i];
    end else begin
      for (int i = 6; i < FRAME_BYTES; i++) f[i] = 8'h00;
    end
    return f;
  endfunction

endpackage
