// bit_bypass: bit-bypass (BB) repair array for a standalone SRAM macro.
//
// A small set of flip-flop repair entries sits beside the macro. Each entry
// holds a failing row address and two repair slots, each with a failing
// column address and a redundant copy of that bit (two repair bits per
// entry, as in the document; ENTRIES is 7 for the L1 tag arrays and 22 for
// the L2 ones). The module watches the macro's port:
//   * write to a repaired row: every valid slot of the matching entry stores
//     the bit being written to its column ("write hit");
//   * read of a repaired row: the read address is registered alongside the
//     macro's own read, and when the macro's data appears, the bits in the
//     repaired columns are replaced by the stored copies ("read hit").
// Flip-flops stay reliable at the low voltage where the bitcells fail, so
// the macro behaves as fault-free. No change to the SRAM itself is needed.
//
// Timing: write capture on the write clock edge; read correction is
// combinational on the macro's registered output (two mux levels), valid in
// the cycle after the read, like the macro's data.
// Programming: one entry field per cfg_valid cycle (row + entry valid, or
// one column slot + slot valid). Reset clears every valid bit.
module bit_bypass #(
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned WIDTH   = 157,
  parameter int unsigned ENTRIES = 22,
  parameter int unsigned AW      = $clog2(DEPTH),
  parameter int unsigned CW      = $clog2(WIDTH),
  parameter int unsigned IW      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // macro port as driven by the user of the array
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  // raw macro output and repaired output
  input  logic [WIDTH-1:0] sram_dout,
  output logic [WIDTH-1:0] dout,
  // programming
  input  logic             cfg_valid,
  input  logic             cfg_col,    // 0: row field, 1: column slot
  input  logic [IW-1:0]    cfg_idx,
  input  logic             cfg_slot,
  input  logic             cfg_flag,   // entry valid / slot valid
  input  logic [AW-1:0]    cfg_row,
  input  logic [CW-1:0]    cfg_colv
);

  typedef struct packed {
    logic          vld;
    logic [AW-1:0] row;
    logic [1:0]    cvld;
    logic [1:0][CW-1:0] col;
    logic [1:0]    bits;
  } bb_entry_t;

  bb_entry_t     ent [ENTRIES];
  logic [AW-1:0] rd_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) ent[e] <= '0;
      rd_addr_q <= '0;
    end else begin
      if (en && !we) rd_addr_q <= addr;
      for (int e = 0; e < ENTRIES; e++) begin
        // write hit: keep a copy of the bits written to the failing cells
        if (en && we && ent[e].vld && ent[e].row == addr)
          for (int s = 0; s < 2; s++)
            if (ent[e].cvld[s] && int'(ent[e].col[s]) < WIDTH)
              ent[e].bits[s] <= din[ent[e].col[s]];
        if (cfg_valid && int'(cfg_idx) == e) begin
          if (!cfg_col) begin
            ent[e].vld <= cfg_flag;
            ent[e].row <= cfg_row;
          end else begin
            ent[e].cvld[cfg_slot] <= cfg_flag;
            ent[e].col[cfg_slot]  <= cfg_colv;
          end
        end
      end
    end
  end

  // read hit: substitute the stored bits
  always_comb begin
    dout = sram_dout;
    for (int e = 0; e < ENTRIES; e++)
      if (ent[e].vld && ent[e].row == rd_addr_q)
        for (int s = 0; s < 2; s++)
          if (ent[e].cvld[s] && int'(ent[e].col[s]) < WIDTH)
            dout[ent[e].col[s]] = ent[e].bits[s];
  end

endmodule
