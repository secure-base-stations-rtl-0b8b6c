// SEC-DED checker and corrector for one 40-bit DRAM word written by
// ecc_encoder: {unused, check[6:0], data[31:0]}.
//
// It recomputes the six Hamming check bits over the stored data and xors them
// with the stored ones; the result (syndrome) is the codeword position of a
// single flipped bit. The overall parity says whether an odd number of bits
// flipped. Odd parity: one error, corrected if it hit a data bit (corrected=1).
// Even parity with a non-zero syndrome: two errors, reported as uncorrectable
// and the data is passed on unchanged. Purely combinational.
module ecc_decoder (
  input  logic [39:0] word,
  output logic [31:0] data,
  output logic        corrected,
  output logic        uncorrectable
);
  import ecc_pkg::*;

  logic [38:1] cw;
  logic [5:0]  syn;
  logic        par;

  always_comb begin
    cw = place_data(word[31:0]);
    for (int i = 0; i < 6; i++) cw[1 << i] = word[32 + i];
    for (int i = 0; i < 6; i++) begin
      syn[i] = 1'b0;
      for (int p = 1; p <= 38; p++)
        if (p[i]) syn[i] = syn[i] ^ cw[p];
    end
    par = ^cw ^ word[38];
    data          = word[31:0];
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (par) begin
      corrected = 1'b1;       // single error: in data, in a check bit or in the parity bit
      for (int j = 0; j < 32; j++)
        if (syn == DATA_POS[6*j +: 6]) data[j] = ~word[j];
    end else if (syn != 6'd0) begin
      uncorrectable = 1'b1;
    end
  end

endmodule
