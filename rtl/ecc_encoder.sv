// SEC-DED check-bit generator for one 32-bit DRAM word.
//
// The off-chip memory stores every 32-bit word with seven extra ECC bits in a
// 40-bit word (one bit unused), so that single-event upsets in DRAM are
// corrected before the Rijndael decryption, which would otherwise spread one
// flipped bit over the whole block and make it look like tampering.
//
// Code: extended Hamming (39,32). Data bits occupy, in order, the positions
// 1..38 of a Hamming codeword that are not powers of two; check bit i
// (i = 0..5) is the parity of all positions with bit i set; check bit 6 is the
// parity of the whole 38-bit codeword, which turns single-error correction into
// double-error detection. The exact code is this design's choice.
// Output word: {1'b0, check[6:0], data[31:0]}. Purely combinational.
module ecc_encoder (
  input  logic [31:0] data,
  output logic [39:0] word
);
  import ecc_pkg::*;

  logic [6:0] check;
  logic [38:1] cw;

  always_comb begin
    cw = place_data(data);
    for (int i = 0; i < 6; i++) begin
      check[i] = 1'b0;
      for (int p = 1; p <= 38; p++)
        if (p[i]) check[i] = check[i] ^ cw[p];
    end
    check[6] = ^cw ^ (^check[5:0]);
    word = {1'b0, check, data};
  end

endmodule
