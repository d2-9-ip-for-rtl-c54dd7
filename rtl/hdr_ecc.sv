// hdr_ecc: SECDED code protecting the packet header on inter-node links.
//
// The 8-bit ECC_CR field (header bits 127:120) carries a Hamming code over the
// other 120 header bits: 7 check bits (codeword positions 1,2,4,...,64 of a
// 127-bit Hamming word, data in the remaining positions in ascending order)
// plus one overall parity bit in ECC_CR[7]. Any single-bit error in the
// 128-bit header is corrected, any double-bit error detected.
// Encoder and decoder are both combinational. enc_out is hdr_in with ECC_CR
// filled in; dec_out is the corrected header, with dec_single (corrected
// error) and dec_double (uncorrectable) flags.
// The document gives the ECC_CR field, EDAC enable bits and the header error
// counters; the code itself is this implementation's choice.
module hdr_ecc (
  input  logic [127:0] enc_in,
  output logic [127:0] enc_out,
  input  logic [127:0] dec_in,
  output logic [127:0] dec_out,
  output logic         dec_single,
  output logic         dec_double
);
  // Spread the 120 data bits into a 128-entry Hamming word (index = position).
  function automatic logic [127:0] spread(input logic [119:0] d);
    logic [127:0] cw;
    int k;
    cw = '0;
    k = 0;
    for (int p = 1; p < 128; p++) begin
      if ((p & (p - 1)) != 0) begin
        cw[p] = d[k];
        k++;
      end
    end
    return cw;
  endfunction

  function automatic logic [119:0] gather(input logic [127:0] cw);
    logic [119:0] d;
    int k;
    d = '0;
    k = 0;
    for (int p = 1; p < 128; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[k] = cw[p];
        k++;
      end
    end
    return d;
  endfunction

  function automatic logic [6:0] checks(input logic [127:0] cw);
    logic [6:0] c;
    c = '0;
    for (int p = 1; p < 128; p++) begin
      if ((p & (p - 1)) != 0) begin
        for (int i = 0; i < 7; i++) if (p[i]) c[i] ^= cw[p];
      end
    end
    return c;
  endfunction

  // Encoder
  always_comb begin
    logic [6:0] c;
    c = checks(spread(enc_in[119:0]));
    enc_out = {(^enc_in[119:0]) ^ (^c), c, enc_in[119:0]};
  end

  // Decoder
  always_comb begin
    logic [127:0] cw;
    logic [6:0]   syn;
    logic         par;
    cw = spread(dec_in[119:0]);
    for (int i = 0; i < 7; i++) cw[1 << i] = dec_in[120 + i];
    syn = checks(cw) ^ dec_in[126:120];
    par = ^dec_in;                       // 0 when no or two errors
    dec_single = 1'b0;
    dec_double = 1'b0;
    if (par) begin
      dec_single = 1'b1;
      if (syn != 7'd0) cw[syn] = ~cw[syn];
    end else if (syn != 7'd0) begin
      dec_double = 1'b1;
    end
    begin
      logic [6:0] c;
      c = '0;
      for (int i = 0; i < 7; i++) c[i] = cw[1 << i];
      dec_out = {(^gather(cw)) ^ (^c), c, gather(cw)};
    end
  end
endmodule
