// dcr_encoder: write-side shifter of dynamic column redundancy (DCR).
//
// A data word of N bits is stored in N+1 SRAM columns. The redundancy
// address (RA) of the set names the one failing column; every data bit at or
// above that column moves one column up, so the failing column is skipped and
// the spare top column is used. Each stored column X[i] is a 2:1 multiplexer
// choosing D[i] (no shift) or D[i-1] (shift), as drawn in the document:
// the select line of column i is a thermometer code that is 1 for every
// column at or above the failing one.
//
// RA encoding (own choice, the document only gives the thermometer form):
// RA = 0 means "no repair" (all columns unshifted, spare written 0), and
// RA = k (1..N+1) means stored column k-1 is failing. A failing column then
// holds a copy of its neighbour, which the decoder never reads.
//
// Purely combinational; adds one 2:1 mux to the write-data path.
module dcr_encoder #(
  parameter int unsigned N    = 137,                 // protected bits (data + ECC)
  parameter int unsigned RA_W = $clog2(N + 2)
) (
  input  logic [N-1:0]  d,
  input  logic [RA_W-1:0] ra,
  output logic [N:0]    x
);

  logic [N:0] shift;   // thermometer select, one per stored column
  logic [N+1:0] dext;  // {0, D, 0}: D[-1] and D[N] read as 0

  always_comb begin
    dext = {1'b0, d, 1'b0};
    for (int unsigned i = 0; i <= N; i++) begin
      shift[i] = (ra != '0) && (i + 1 >= ra);
      // dext[i+1] = D[i], dext[i] = D[i-1]
      x[i] = shift[i] ? dext[i] : dext[i+1];
    end
  end

endmodule
