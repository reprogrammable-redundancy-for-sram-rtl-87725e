// rr_cache_top: cache hierarchy of the RR test processor with all of its
// reprogrammable redundancy.
//
// Contents, following the document's block diagram and chip summary:
//   * L1 instruction cache: 16 KB, 2-way, 128 sets, 128-bit words,
//     7 BB entries on the tag array;
//   * L1 data cache: 32 KB, 4-way, 128 sets, 64-bit words, 7 BB entries;
//   * crossbar network from both L1s to the L2;
//   * 1-MB L2: 4 banks, each 8-way, 512 sets, 128-bit words, 22 BB entries;
//   * one BIST sequencer per voltage domain (L1 domain, L2 domain), every
//     macro with its own checker;
//   * the SCR block that runs BIST, reads errors and programs BB/DCR/LD;
//   * the MEMIO arbiter in front of the off-chip memory port.
// Every cache array has SEC-DED check bits and a DCR spare column, every
// tag array a BB repair array, every tag row per-way line-disable bits and a
// per-set redundancy address with its own SEC-DED check bits.
//
// The processor pipeline is outside this module: its instruction-fetch and
// data ports are ports of the top. So are the SCR bus (reached from the host
// interface) and the MEMIO line port. Everything runs on one clock here;
// the chip's three voltage/clock domains and their asynchronous FIFOs are
// not modelled. Line = 512 bits; memory writes are posted.
module rr_cache_top
  import rr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // instruction fetch (read only)
  input  logic               if_req_valid,
  output logic               if_req_ready,
  input  logic [PADDR_W-1:0] if_req_addr,
  output logic               if_resp_valid,
  output logic [127:0]       if_resp_rdata,
  // data access
  input  logic               d_req_valid,
  output logic               d_req_ready,
  input  logic               d_req_we,
  input  logic [PADDR_W-1:0] d_req_addr,
  input  logic [63:0]        d_req_wdata,
  output logic               d_resp_valid,
  output logic [63:0]        d_resp_rdata,
  // system control registers
  input  logic               scr_we,
  input  logic [7:0]         scr_addr,
  input  logic [31:0]        scr_wdata,
  output logic [31:0]        scr_rdata,
  // MEMIO
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [PADDR_W-1:0] mem_req_addr,
  output logic [LINE_W-1:0]  mem_req_wdata,
  input  logic               mem_resp_valid,
  input  logic [LINE_W-1:0]  mem_resp_rdata
);

  localparam int unsigned NB      = 4;
  localparam int unsigned ERR_W   = 256;
  localparam int unsigned L1_ROWS = 1024;   // deepest L1 array (D$ data)
  localparam int unsigned L2_ROWS = 2048;   // deepest L2 array

  // ------------------------------------------------------------- control
  logic [N_TARGETS-1:0]            cfg_valid, cfg_ready;
  rr_cmd_t                         cfg;
  logic                            ecc_corr_en;
  logic [N_TARGETS-1:0]            ev_single, ev_double;
  logic [1:0]                      bist_start, bist_busy, bist_ovf;
  logic [7:0]                      bist_test;
  logic                            bist_alt;
  logic [3:0]                      err_sel;
  logic [N_TARGETS-1:0]            err_valid, err_pop;
  logic [N_TARGETS-1:0][15:0]      err_addr;
  logic [N_TARGETS-1:0][7:0]       err_test;
  logic [N_TARGETS-1:0][ERR_W-1:0] err_dout;
  logic [N_TARGETS-1:0]            stall_t, ovf_t;

  rr_control #(.ERR_W(ERR_W)) u_ctrl (
    .clk, .rst_n, .scr_we, .scr_addr, .scr_wdata, .scr_rdata,
    .cfg_valid, .cfg_ready, .cfg, .ecc_corr_en,
    .ev_ecc_single(ev_single), .ev_ecc_double(ev_double),
    .bist_start, .bist_test, .bist_alt, .bist_busy, .bist_overflow(bist_ovf),
    .err_sel, .err_valid, .err_addr, .err_test, .err_dout, .err_pop);

  bist_op_t l1_op, l2_op;

  bist_ctrl #(.DEPTH(L1_ROWS)) u_bist_l1 (
    .clk, .rst_n, .start(bist_start[0]), .test(bist_test), .alt(bist_alt),
    .stall(stall_t[0] | stall_t[1]), .op(l1_op), .busy(bist_busy[0]), .done());

  bist_ctrl #(.DEPTH(L2_ROWS)) u_bist_l2 (
    .clk, .rst_n, .start(bist_start[1]), .test(bist_test), .alt(bist_alt),
    .stall(|stall_t[5:2]), .op(l2_op), .busy(bist_busy[1]), .done());

  assign bist_ovf = {|ovf_t[5:2], ovf_t[0] | ovf_t[1]};

  // ------------------------------------------------------------- L1 caches
  logic [1:0]                 c_req_valid, c_req_ready, c_req_we, c_resp_valid;
  logic [1:0][PADDR_W-1:0]    c_req_addr;
  logic [1:0][LINE_W-1:0]     c_req_wdata;
  logic [LINE_W-1:0]          c_resp_rdata;

  localparam int unsigned IC_ERR = 138;
  localparam int unsigned DC_ERR = 95;
  logic [IC_ERR-1:0] ic_err_dout;
  logic [DC_ERR-1:0] dc_err_dout;

  rr_cache_bank #(.WAYS(2), .SETS(128), .K(128), .BB_ENTRIES(7), .BANK_W(0), .BANK_ID(0)) u_icache (
    .clk, .rst_n,
    .req_valid(if_req_valid), .req_ready(if_req_ready), .req_we(1'b0),
    .req_addr(if_req_addr), .req_wdata('0),
    .resp_valid(if_resp_valid), .resp_rdata(if_resp_rdata),
    .mem_req_valid(c_req_valid[0]), .mem_req_ready(c_req_ready[0]), .mem_req_we(c_req_we[0]),
    .mem_req_addr(c_req_addr[0]), .mem_req_wdata(c_req_wdata[0]),
    .mem_resp_valid(c_resp_valid[0]), .mem_resp_rdata(c_resp_rdata),
    .cfg_valid(cfg_valid[TGT_ICACHE]), .cfg_ready(cfg_ready[TGT_ICACHE]), .cfg, .ecc_corr_en,
    .ev_ecc_single(ev_single[TGT_ICACHE]), .ev_ecc_double(ev_double[TGT_ICACHE]),
    .bist_en(bist_busy[0]), .bist_op(l1_op),
    .bist_stall(stall_t[TGT_ICACHE]), .bist_overflow(ovf_t[TGT_ICACHE]),
    .err_sel(err_sel[1:0]), .err_valid(err_valid[TGT_ICACHE]), .err_addr(err_addr[TGT_ICACHE]),
    .err_dout(ic_err_dout), .err_test(err_test[TGT_ICACHE]), .err_pop(err_pop[TGT_ICACHE]));
  assign err_dout[TGT_ICACHE] = ERR_W'(ic_err_dout);

  rr_cache_bank #(.WAYS(4), .SETS(128), .K(64), .BB_ENTRIES(7), .BANK_W(0), .BANK_ID(0)) u_dcache (
    .clk, .rst_n,
    .req_valid(d_req_valid), .req_ready(d_req_ready), .req_we(d_req_we),
    .req_addr(d_req_addr), .req_wdata(d_req_wdata),
    .resp_valid(d_resp_valid), .resp_rdata(d_resp_rdata),
    .mem_req_valid(c_req_valid[1]), .mem_req_ready(c_req_ready[1]), .mem_req_we(c_req_we[1]),
    .mem_req_addr(c_req_addr[1]), .mem_req_wdata(c_req_wdata[1]),
    .mem_resp_valid(c_resp_valid[1]), .mem_resp_rdata(c_resp_rdata),
    .cfg_valid(cfg_valid[TGT_DCACHE]), .cfg_ready(cfg_ready[TGT_DCACHE]), .cfg, .ecc_corr_en,
    .ev_ecc_single(ev_single[TGT_DCACHE]), .ev_ecc_double(ev_double[TGT_DCACHE]),
    .bist_en(bist_busy[0]), .bist_op(l1_op),
    .bist_stall(stall_t[TGT_DCACHE]), .bist_overflow(ovf_t[TGT_DCACHE]),
    .err_sel(err_sel[2:0]), .err_valid(err_valid[TGT_DCACHE]), .err_addr(err_addr[TGT_DCACHE]),
    .err_dout(dc_err_dout), .err_test(err_test[TGT_DCACHE]), .err_pop(err_pop[TGT_DCACHE]));
  assign err_dout[TGT_DCACHE] = ERR_W'(dc_err_dout);

  // ------------------------------------------------------------- crossbar
  logic [NB-1:0]              b_req_valid, b_req_ready, b_resp_valid;
  logic                       b_req_we;
  logic [PADDR_W-1:0]         b_req_addr;
  logic [127:0]               b_req_wdata;
  logic [NB-1:0][127:0]       b_resp_rdata;

  l2_xbar #(.NB(NB), .K(128)) u_xbar (
    .clk, .rst_n,
    .c_req_valid, .c_req_ready, .c_req_we, .c_req_addr, .c_req_wdata,
    .c_resp_valid, .c_resp_rdata,
    .b_req_valid, .b_req_ready, .b_req_we, .b_req_addr, .b_req_wdata,
    .b_resp_valid, .b_resp_rdata);

  // ------------------------------------------------------------- L2 banks
  logic [NB-1:0]              m_valid, m_ready, m_we, m_resp_valid;
  logic [NB-1:0][PADDR_W-1:0] m_addr;
  logic [NB-1:0][LINE_W-1:0]  m_wdata;
  logic [LINE_W-1:0]          m_resp_rdata;

  for (genvar b = 0; b < NB; b++) begin : g_l2
    logic [151:0] l2_err_dout;
    rr_cache_bank #(.WAYS(8), .SETS(512), .K(128), .BB_ENTRIES(22), .BANK_W(2), .BANK_ID(b)) u_bank (
      .clk, .rst_n,
      .req_valid(b_req_valid[b]), .req_ready(b_req_ready[b]), .req_we(b_req_we),
      .req_addr(b_req_addr), .req_wdata(b_req_wdata),
      .resp_valid(b_resp_valid[b]), .resp_rdata(b_resp_rdata[b]),
      .mem_req_valid(m_valid[b]), .mem_req_ready(m_ready[b]), .mem_req_we(m_we[b]),
      .mem_req_addr(m_addr[b]), .mem_req_wdata(m_wdata[b]),
      .mem_resp_valid(m_resp_valid[b]), .mem_resp_rdata(m_resp_rdata),
      .cfg_valid(cfg_valid[TGT_L2B0 + b]), .cfg_ready(cfg_ready[TGT_L2B0 + b]), .cfg, .ecc_corr_en,
      .ev_ecc_single(ev_single[TGT_L2B0 + b]), .ev_ecc_double(ev_double[TGT_L2B0 + b]),
      .bist_en(bist_busy[1]), .bist_op(l2_op),
      .bist_stall(stall_t[TGT_L2B0 + b]), .bist_overflow(ovf_t[TGT_L2B0 + b]),
      .err_sel(err_sel), .err_valid(err_valid[TGT_L2B0 + b]), .err_addr(err_addr[TGT_L2B0 + b]),
      .err_dout(l2_err_dout), .err_test(err_test[TGT_L2B0 + b]), .err_pop(err_pop[TGT_L2B0 + b]));
    assign err_dout[TGT_L2B0 + b] = ERR_W'(l2_err_dout);
  end

  memio_arb #(.NB(NB)) u_memio (
    .clk, .rst_n,
    .b_req_valid(m_valid), .b_req_ready(m_ready), .b_req_we(m_we), .b_req_addr(m_addr),
    .b_req_wdata(m_wdata), .b_resp_valid(m_resp_valid), .b_resp_rdata(m_resp_rdata),
    .m_req_valid(mem_req_valid), .m_req_ready(mem_req_ready), .m_req_we(mem_req_we),
    .m_req_addr(mem_req_addr), .m_req_wdata(mem_req_wdata),
    .m_resp_valid(mem_resp_valid), .m_resp_rdata(mem_resp_rdata));

endmodule
