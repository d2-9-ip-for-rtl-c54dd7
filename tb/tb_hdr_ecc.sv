// tb_hdr_ecc: encodes random headers, corrupts 0, 1 or 2 bits of the 128-bit
// word and checks that the decoder returns the original header (0 or 1
// error), flags single errors, and flags double errors as uncorrectable.
// Also checks the check bits against a direct Hamming computation.
module tb_hdr_ecc;
  logic [127:0] enc_in, enc_out, dec_in, dec_out;
  logic dec_single, dec_double;
  int checks = 0, failures = 0;

  hdr_ecc dut (.*);

  function automatic logic [7:0] ref_ecc(input logic [119:0] d);
    logic [6:0] c;
    int k, pos;
    c = '0;
    k = 0;
    for (pos = 1; pos < 128; pos++) begin
      if (pos != 1 && pos != 2 && pos != 4 && pos != 8 && pos != 16 && pos != 32 && pos != 64) begin
        if (d[k]) c = c ^ 7'(pos);
        k++;
      end
    end
    return {(^d) ^ (^c), c};
  endfunction

  initial begin
    int b1, b2;
    logic [127:0] cw;
    for (int i = 0; i < 3000; i++) begin
      enc_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      cw = enc_out;
      checks++;
      if (cw[119:0] != enc_in[119:0] || cw[127:120] != ref_ecc(enc_in[119:0])) begin
        failures++; $display("FAIL encode");
      end
      dec_in = cw;
      #1;
      checks++;
      if (dec_out != cw || dec_single || dec_double) begin failures++; $display("FAIL clean decode"); end
      b1 = $urandom % 128;
      dec_in = cw ^ (128'h1 << b1);
      #1;
      checks++;
      if (dec_out != cw || !dec_single || dec_double) begin failures++; $display("FAIL single bit %0d", b1); end
      b2 = (b1 + 1 + $urandom % 127) % 128;
      dec_in = cw ^ (128'h1 << b1) ^ (128'h1 << b2);
      #1;
      checks++;
      if (!dec_double || dec_single) begin failures++; $display("FAIL double bits %0d %0d", b1, b2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
