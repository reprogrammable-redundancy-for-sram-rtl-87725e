// secded_enc: SEC-DED check-bit generator (extended Hamming code).
//
// Every SRAM word of the caches carries SEC-DED check bits: 9 for a 128-bit
// word and 8 for a 64-bit word, as the document states. The code itself is
// not given; this is a systematic extended Hamming code. Data bit i takes the
// i-th Hamming position that is not a power of two (3, 5, 6, 7, 9, ...);
// check bit j is the parity of the data bits whose position has bit j set,
// and the top bit is the parity of the whole word.
//
// Output word layout: {overall parity, check[R-1:0], data[K-1:0]}.
// Combinational.
module secded_enc #(
  parameter int unsigned K = 128,
  parameter int unsigned R = secded_hamming_bits(K),  // Hamming check bits
  parameter int unsigned C = R + 1                    // total check bits
) (
  input  logic [K-1:0]   d,
  output logic [K+C-1:0] cw
);

  function automatic int unsigned secded_hamming_bits(int unsigned k);
    int unsigned r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Hamming position of data bit i.
  function automatic int unsigned data_pos(int unsigned i);
    int unsigned p = 2;
    int unsigned n = 0;
    while (1) begin
      p++;
      if ((p & (p - 1)) != 0) begin
        if (n == i) return p;
        n++;
      end
    end
    return 0;
  endfunction

  // Constant tables: Hamming position of every data bit, and for every
  // check bit the mask of data bits it covers.
  typedef logic [K-1:0][R-1:0] pos_t;
  typedef logic [R-1:0][K-1:0] mask_t;

  function automatic pos_t pos_table();
    pos_t t;
    for (int unsigned i = 0; i < K; i++) t[i] = R'(data_pos(i));
    return t;
  endfunction

  function automatic mask_t mask_table();
    mask_t m = '0;
    for (int unsigned i = 0; i < K; i++)
      for (int unsigned j = 0; j < R; j++)
        if (((data_pos(i) >> j) & 1) != 0) m[j][i] = 1'b1;
    return m;
  endfunction

  localparam pos_t  POS  = pos_table();
  localparam mask_t MASK = mask_table();

  logic [R-1:0] chk;

  always_comb begin
    for (int unsigned j = 0; j < R; j++) chk[j] = ^(d & MASK[j]);
    cw = {^{chk, d}, chk, d};
  end

endmodule
