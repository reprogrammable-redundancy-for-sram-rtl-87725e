// secded_dec: SEC-DED checker matching secded_enc.
//
// Recomputes the Hamming check bits from the stored data, forms the syndrome
// and the overall parity, and classifies the word:
//   parity odd,  syndrome 0      -> single error in the parity bit
//   parity odd,  syndrome != 0   -> single error at that Hamming position
//   parity even, syndrome != 0   -> double error (uncorrectable)
// Correction is switchable (corr_en), because while the RR repairs are being
// measured the code is used only to log errors, not to hide them; the error
// flags are produced either way. Combinational.
module secded_dec #(
  parameter int unsigned K = 128,
  parameter int unsigned R = secded_hamming_bits(K),
  parameter int unsigned C = R + 1
) (
  input  logic [K+C-1:0] cw,
  input  logic           corr_en,
  output logic [K-1:0]   d,
  output logic           single_err,  // correctable error seen
  output logic           double_err   // uncorrectable error seen
);

  function automatic int unsigned secded_hamming_bits(int unsigned k);
    int unsigned r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

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

  logic [K-1:0] din;
  logic [R-1:0] chk_in, syn;
  logic         par;

  always_comb begin
    din    = cw[K-1:0];
    chk_in = cw[K+R-1:K];
    for (int unsigned j = 0; j < R; j++) syn[j] = chk_in[j] ^ (^(din & MASK[j]));
    par        = ^cw;
    single_err = par;
    double_err = !par && (syn != '0);
    d          = din;
    if (corr_en && par)
      for (int unsigned i = 0; i < K; i++)
        if (POS[i] == syn) d[i] = ~din[i];
  end

endmodule
