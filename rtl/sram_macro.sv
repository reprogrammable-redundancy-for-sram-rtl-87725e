// sram_macro: behavioural model of a compiled single-port SRAM macro
// (high-density 6T macros in the L2, 8T macros in the L1).
//
// This is a simulation model, not synthesizable logic: in silicon it is a
// process-specific macro. It is synchronous, with one read/write port and a
// registered read (data valid one cycle after en && !we). To stand in for
// the low-voltage bitcell failures the repair logic exists for, up to
// MAX_FAULTS failing bitcells can be injected with inject_fault(); a failing
// cell is modelled as stuck at a value: it ignores writes and always reads
// that value. clear_faults() removes them. Contents start unknown (random in
// a two-state simulator), as after power-up.
module sram_macro #(
  parameter int unsigned DEPTH      = 512,
  parameter int unsigned WIDTH      = 138,
  parameter int unsigned MAX_FAULTS = 16,
  parameter int unsigned AW         = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  // Failing-bitcell list.
  logic              f_vld [MAX_FAULTS];
  int unsigned       f_row [MAX_FAULTS];
  int unsigned       f_col [MAX_FAULTS];
  logic              f_val [MAX_FAULTS];

  initial for (int i = 0; i < MAX_FAULTS; i++) f_vld[i] = 1'b0;

  task automatic clear_faults();
    for (int i = 0; i < MAX_FAULTS; i++) f_vld[i] = 1'b0;
  endtask

  task automatic inject_fault(int unsigned row, int unsigned col, logic val);
    for (int i = 0; i < MAX_FAULTS; i++)
      if (!f_vld[i]) begin
        f_vld[i] = 1'b1;
        f_row[i] = row;
        f_col[i] = col;
        f_val[i] = val;
        return;
      end
    $error("sram_macro: fault list full");
  endtask

  function automatic logic [WIDTH-1:0] apply_faults(int unsigned row, logic [WIDTH-1:0] v);
    logic [WIDTH-1:0] r = v;
    for (int i = 0; i < MAX_FAULTS; i++)
      if (f_vld[i] && f_row[i] == row && f_col[i] < WIDTH) r[f_col[i]] = f_val[i];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= apply_faults(int'(addr), din);
      else    dout      <= apply_faults(int'(addr), mem[addr]);
    end
  end

endmodule
