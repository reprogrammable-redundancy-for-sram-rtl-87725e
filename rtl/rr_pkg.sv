// rr_pkg: types and constants shared by the reprogrammable-redundancy (RR)
// cache system.
//
// The RR scheme protects every SRAM bitcell of an L1/L2 cache hierarchy with
// three repair mechanisms: bit bypass (BB) for tag arrays, dynamic column
// redundancy (DCR) for data arrays, and line disable (LD) for lines with more
// than one failing bit. They are programmed by a 32-bit command written over
// the system-control-register (SCR) bus. The command layout below is this
// design's own encoding; the document only states that a 32-bit command is
// used.
package rr_pkg;

  // Physical address width used by all caches (own choice).
  localparam int unsigned PADDR_W  = 32;
  localparam int unsigned LINE_B   = 64;           // 512-bit lines (L1 and L2)
  localparam int unsigned LINE_W   = LINE_B * 8;
  localparam int unsigned OFFS_W   = $clog2(LINE_B);

  // Cache targets addressed by an RR command.
  typedef enum logic [2:0] {
    TGT_ICACHE = 3'd0,
    TGT_DCACHE = 3'd1,
    TGT_L2B0   = 3'd2,
    TGT_L2B1   = 3'd3,
    TGT_L2B2   = 3'd4,
    TGT_L2B3   = 3'd5
  } rr_target_e;

  localparam int unsigned N_TARGETS = 6;

  // RR programming operations.
  typedef enum logic [2:0] {
    RR_NOP     = 3'd0,
    RR_BB_ROW  = 3'd1,   // BB entry idx: failing row, flag = entry valid
    RR_BB_COL  = 3'd2,   // BB entry idx, repair slot: failing column, flag = slot valid
    RR_DCR_RA  = 3'd3,   // redundancy address of set 'row' := 'val'
    RR_LD      = 3'd4,   // line disable bit of (set 'row', way idx) := flag
    RR_ECC_CFG = 3'd5    // flag = SEC-DED correction enable
  } rr_op_e;

  // 32-bit RR command word.
  typedef struct packed {
    rr_op_e     op;     // [31:29]
    rr_target_e target; // [28:26]
    logic [4:0] idx;    // [25:21] BB entry or way
    logic       slot;   // [20]    BB repair-bit slot (0/1)
    logic       flag;   // [19]    valid / disable / enable
    logic [7:0] val;    // [18:11] column or redundancy address
    logic [10:0] row;   // [10:0]  tag row (= set index)
  } rr_cmd_t;

  // One step of the March sequence, broadcast to all SRAMs of a domain.
  typedef struct packed {
    logic        en;     // an operation is issued this cycle
    logic        we;     // 1 = write, 0 = read-and-compare
    logic        dbit;   // data bit written, or expected on a read
    logic [15:0] addr;   // row address (wide enough for the deepest array)
    logic [7:0]  test;   // test number, logged with each error
  } bist_op_t;

endpackage
