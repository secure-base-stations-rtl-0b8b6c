// Helpers of the (39,32) SEC-DED code used on the 40-bit DRAM words: where
// each data bit sits in the 38-position Hamming codeword. Positions that are
// powers of two (1, 2, 4, 8, 16, 32) hold check bits; data bit j takes the
// j-th remaining position.
package ecc_pkg;

  // Table of data-bit positions, 6 bits per data bit, built at elaboration.
  function automatic logic [6*32-1:0] gen_data_pos();
    logic [6*32-1:0] t;
    int n;
    t = '0;
    n = 0;
    for (int p = 1; p <= 38; p++)
      if ((p & (p - 1)) != 0) begin
        t[6*n +: 6] = 6'(p);
        n++;
      end
    return t;
  endfunction

  localparam logic [6*32-1:0] DATA_POS = gen_data_pos();

  function automatic int data_pos(input int j);
    return int'(DATA_POS[6*j +: 6]);
  endfunction

  // Spread data bits over the codeword; check positions are left zero.
  function automatic logic [38:1] place_data(input logic [31:0] d);
    logic [38:1] cw;
    cw = '0;
    for (int j = 0; j < 32; j++) cw[data_pos(j)] = d[j];
    return cw;
  endfunction

endpackage
