// dcr_decoder: read-side shifter of dynamic column redundancy (DCR).
//
// Inverse of dcr_encoder: N+1 stored columns X are turned back into the N
// data bits. Data bit D[i] is taken from X[i+1] when column i is at or above
// the failing column named by the redundancy address, else from X[i]. The
// thermometer select is the encoder's without its top bit, as in the
// document's decoding diagram. One 2:1 mux on the read-data path.
//
// RA encoding is shared with dcr_encoder: 0 = no repair, k = column k-1
// failing.
module dcr_decoder #(
  parameter int unsigned N    = 137,
  parameter int unsigned RA_W = $clog2(N + 2)
) (
  input  logic [N:0]      x,
  input  logic [RA_W-1:0] ra,
  output logic [N-1:0]    d
);

  logic [N-1:0] shift;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      shift[i] = (ra != '0) && (i + 1 >= ra);
      d[i]     = shift[i] ? x[i+1] : x[i];
    end
  end

endmodule
