// rr_cache_bank: one set-associative cache bank with reprogrammable
// redundancy (RR). Used for the L1 instruction cache, the L1 data cache and
// each of the four L2 banks.
//
// Arrays (all sram_macro):
//   * one tag macro, one row per set:
//       {RA code word[RA_CW-1:0], LD[WAYS-1:0], meta[WAYS-1:0]},
//       meta = {valid, dirty, tag}
//     guarded by a bit_bypass array. The per-set redundancy address (RA) of
//     DCR and the per-way line-disable (LD) bits live in the tag row, so
//     they are read in parallel with the tags and are themselves protected
//     by BB. The RA is stored as a SEC-DED code word of its own (8 bits + 5
//     check bits for the 138-bit data rows, as the document gives; 7 + 5
//     for the D$); its errors are reported on ev_ecc_* in LOOKUP and, with
//     correction enabled, corrected before the RA reaches the shifters.
//   * one data macro per way, one row per (set, word), K data bits + SEC-DED
//     check bits + one DCR spare column.
// Datapath: a write goes secded_enc -> dcr_encoder (with the set's RA from
// the tag read) -> data macro; a read goes data macro -> dcr_decoder -> 
// secded_dec. A single RA serves every way and word of the set, so DCR
// repairs one bit column per set.
// Line disable: a way whose LD bit is set never hits and is never chosen
// for a refill. If every way of a set is disabled the access is served
// straight from memory (a write then becomes a read-merge-write of the line).
//
// The cache protocol is this design's own (the document's caches come from
// an existing processor): blocking, write-back, write-allocate, replacement
// by the first invalid enabled way, else a rotating pointer that skips
// disabled ways.
//
// Timing: a request is taken in IDLE; the tag macro and every way's data
// macro are read in that cycle; in the next cycle (LOOKUP) tags are compared
// and a read hit answers with resp_valid, a write hit writes data and the
// dirty bit. A miss writes back a dirty victim (WORDS reads, one line
// write), fetches the line, writes it in WORDS cycles, then answers.
// After reset and after each BIST run the bank spends SETS cycles clearing
// its tag rows (INIT), which also clears RA and LD: program them afterwards.
// Programming (cfg_*): BB fields are taken at once; RA and LD are written by
// a read-modify-write of the tag row (2 cycles).
// BIST: while bist_en is high every macro follows the broadcast BIST
// operation instead of the cache, and each has its own bist_checker; the
// host reads error entries through err_sel/err_pop.
module rr_cache_bank
  import rr_pkg::*;
#(
  parameter int unsigned WAYS       = 8,
  parameter int unsigned SETS       = 512,
  parameter int unsigned K          = 128,  // data bits per word
  parameter int unsigned BB_ENTRIES = 22,
  parameter int unsigned BANK_W     = 2,    // address bits selecting the bank
  parameter int unsigned BANK_ID    = 0,
  parameter int unsigned MAX_FAULTS = 16,   // per-macro fault list of the model
  // derived
  parameter int unsigned WORDS  = LINE_W / K,
  parameter int unsigned R_ECC  = secded_r(K),
  parameter int unsigned C_ECC  = R_ECC + 1,
  parameter int unsigned N_DCR  = K + C_ECC,          // columns protected by DCR
  parameter int unsigned DATA_W = N_DCR + 1,          // + spare column
  parameter int unsigned RA_W   = $clog2(N_DCR + 2),
  parameter int unsigned SET_W  = $clog2(SETS),
  parameter int unsigned WI_W   = $clog2(WORDS),
  parameter int unsigned BO_W   = $clog2(K / 8),
  parameter int unsigned TAG_W  = PADDR_W - OFFS_W - BANK_W - SET_W,
  parameter int unsigned META_W = TAG_W + 2,
  parameter int unsigned RA_CW  = RA_W + secded_r(RA_W) + 1, // RA + its SEC-DED bits
  parameter int unsigned TROW_W = WAYS * META_W + WAYS + RA_CW,
  parameter int unsigned D_AW   = SET_W + WI_W,
  parameter int unsigned ERR_W  = (TROW_W > DATA_W) ? TROW_W : DATA_W,
  parameter int unsigned SEL_W  = $clog2(WAYS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // word request port
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               req_we,
  input  logic [PADDR_W-1:0] req_addr,
  input  logic [K-1:0]       req_wdata,
  output logic               resp_valid,
  output logic [K-1:0]       resp_rdata,
  // line memory port (writes are posted)
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [PADDR_W-1:0] mem_req_addr,
  output logic [LINE_W-1:0]  mem_req_wdata,
  input  logic               mem_resp_valid,
  input  logic [LINE_W-1:0]  mem_resp_rdata,
  // RR programming
  input  logic               cfg_valid,
  output logic               cfg_ready,
  input  rr_cmd_t            cfg,
  input  logic               ecc_corr_en,
  output logic               ev_ecc_single,
  output logic               ev_ecc_double,
  // BIST
  input  logic               bist_en,
  input  bist_op_t           bist_op,
  output logic               bist_stall,
  output logic               bist_overflow,
  input  logic [SEL_W-1:0]   err_sel,
  output logic               err_valid,
  output logic [15:0]        err_addr,
  output logic [ERR_W-1:0]   err_dout,
  output logic [7:0]         err_test,
  input  logic               err_pop
);

  function automatic int unsigned secded_r(int unsigned k);
    int unsigned r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned BIW = (BB_ENTRIES > 1) ? $clog2(BB_ENTRIES) : 1;
  localparam int unsigned BCW = $clog2(TROW_W);

  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
  } meta_t;

  typedef struct packed {
    logic [RA_CW-1:0]       ra_cw;   // {parity, check bits, RA}
    logic [WAYS-1:0]        ld;
    meta_t [WAYS-1:0]       meta;
  } trow_t;

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_WB_RD, S_WB_REQ, S_FILL_REQ, S_FILL_WAIT,
    S_FILL_WR, S_BYP_WR, S_RESP, S_CFG
  } state_e;

  state_e state_q;

  // ---------------------------------------------------------------- request
  logic               we_q;
  logic [TAG_W-1:0]   tag_q;
  logic [SET_W-1:0]   set_q;
  logic [WI_W-1:0]    wi_q;
  logic [K-1:0]       wdata_q;
  rr_cmd_t            cfg_q;
  trow_t              trow_q;      // tag row as read in LOOKUP/CFG
  logic [WW-1:0]      victim_q;
  logic               no_way_q;    // every way disabled
  logic [WW-1:0]      rr_q;        // rotating replacement pointer
  logic [WI_W:0]      cnt_q;       // word counter for line moves
  logic [SET_W:0]     init_q;
  logic [K-1:0]       line_q [WORDS];
  logic               bist_q;

  // ---------------------------------------------------------------- macros
  logic              t_en, t_we;
  logic [SET_W-1:0]  t_addr;
  logic [TROW_W-1:0] t_din, t_raw, t_dout;
  logic              d_en [WAYS];
  logic              d_we [WAYS];
  logic [D_AW-1:0]   d_addr;
  logic [DATA_W-1:0] d_din;
  logic [DATA_W-1:0] d_raw [WAYS];

  // cache-side drive (before the BIST mux)
  logic              c_t_en, c_t_we;
  logic [SET_W-1:0]  c_t_addr;
  trow_t             c_t_din;
  logic [WAYS-1:0]   c_d_en, c_d_we;
  logic [D_AW-1:0]   c_d_addr;
  logic [K-1:0]      c_d_wdata;

  logic t_bist_en, d_bist_en;
  assign t_bist_en = bist_op.en && (int'(bist_op.addr) < SETS);
  assign d_bist_en = bist_op.en && (int'(bist_op.addr) < SETS * WORDS);

  trow_t trow;   // BB-repaired tag row
  assign trow = trow_t'(t_dout);

  // write datapath: SEC-DED then DCR shift with the set's RA
  logic [N_DCR-1:0] enc_cw;
  logic [RA_W-1:0]  ra_cur;
  logic [DATA_W-1:0] enc_x;
  secded_enc #(.K(K)) u_enc (.d(c_d_wdata), .cw(enc_cw));
  dcr_encoder #(.N(N_DCR), .RA_W(RA_W)) u_dcr_enc (.d(enc_cw), .ra(ra_cur), .x(enc_x));

  always_comb begin
    t_en   = bist_en ? t_bist_en : c_t_en;
    t_we   = bist_en ? bist_op.we : c_t_we;
    t_addr = bist_en ? SET_W'(bist_op.addr) : c_t_addr;
    t_din  = bist_en ? {TROW_W{bist_op.dbit}} : TROW_W'(c_t_din);
    d_addr = bist_en ? D_AW'(bist_op.addr) : c_d_addr;
    d_din  = bist_en ? {DATA_W{bist_op.dbit}} : enc_x;
    for (int w = 0; w < WAYS; w++) begin
      d_en[w] = bist_en ? d_bist_en : c_d_en[w];
      d_we[w] = bist_en ? bist_op.we : c_d_we[w];
    end
  end

  sram_macro #(.DEPTH(SETS), .WIDTH(TROW_W), .MAX_FAULTS(MAX_FAULTS)) u_tag (
    .clk, .en(t_en), .we(t_we), .addr(t_addr), .din(t_din), .dout(t_raw));

  bit_bypass #(.DEPTH(SETS), .WIDTH(TROW_W), .ENTRIES(BB_ENTRIES)) u_bb (
    .clk, .rst_n,
    .en(t_en), .we(t_we), .addr(t_addr), .din(t_din),
    .sram_dout(t_raw), .dout(t_dout),
    .cfg_valid(cfg_valid && cfg_ready && (cfg.op == RR_BB_ROW || cfg.op == RR_BB_COL)),
    .cfg_col(cfg.op == RR_BB_COL),
    .cfg_idx(BIW'(cfg.idx)),
    .cfg_slot(cfg.slot), .cfg_flag(cfg.flag),
    .cfg_row(SET_W'(cfg.row)), .cfg_colv(BCW'(cfg.val)));

  // BIST error buffers: [0] tag macro, [w+1] data macro of way w
  logic              chk_valid [WAYS+1];
  logic [15:0]       chk_addr  [WAYS+1];
  logic [7:0]        chk_test  [WAYS+1];
  logic              chk_af    [WAYS+1];
  logic              chk_ovf   [WAYS+1];
  logic [TROW_W-1:0] chk_dout_t;
  logic [DATA_W-1:0] chk_dout_d [WAYS];

  // read datapath per way: DCR unshift, then SEC-DED check
  logic [K-1:0] rd_word [WAYS];
  logic         rd_sec [WAYS];
  logic         rd_ded [WAYS];
  logic [RA_W-1:0] ra_rd;   // RA applying to the data now at the macro outputs

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [N_DCR-1:0] cw;
    sram_macro #(.DEPTH(SETS * WORDS), .WIDTH(DATA_W), .MAX_FAULTS(MAX_FAULTS)) u_data (
      .clk, .en(d_en[w]), .we(d_we[w]), .addr(d_addr), .din(d_din), .dout(d_raw[w]));
    dcr_decoder #(.N(N_DCR), .RA_W(RA_W)) u_dcr_dec (.x(d_raw[w]), .ra(ra_rd), .d(cw));
    secded_dec #(.K(K)) u_dec (.cw(cw), .corr_en(ecc_corr_en),
                               .d(rd_word[w]), .single_err(rd_sec[w]), .double_err(rd_ded[w]));
    bist_checker #(.WIDTH(DATA_W), .DEPTH(SETS * WORDS)) u_chk (
      .clk, .rst_n, .op(bist_en ? bist_op : '0), .dout(d_raw[w]),
      .err_valid(chk_valid[w+1]), .err_addr(chk_addr[w+1]),
      .err_dout(chk_dout_d[w]), .err_test(chk_test[w+1]),
      .err_pop(err_pop && int'(err_sel) == w + 1),
      .almost_full(chk_af[w+1]), .overflow(chk_ovf[w+1]));
  end

  // ---------------------------------------------------------------- BIST readout

  bist_checker #(.WIDTH(TROW_W), .DEPTH(SETS)) u_chk_tag (
    .clk, .rst_n, .op(bist_en ? bist_op : '0), .dout(t_raw),
    .err_valid(chk_valid[0]), .err_addr(chk_addr[0]), .err_dout(chk_dout_t),
    .err_test(chk_test[0]), .err_pop(err_pop && err_sel == '0),
    .almost_full(chk_af[0]), .overflow(chk_ovf[0]));

  always_comb begin
    bist_stall    = 1'b0;
    bist_overflow = 1'b0;
    for (int m = 0; m <= WAYS; m++) begin
      bist_stall    |= chk_af[m];
      bist_overflow |= chk_ovf[m];
    end
    err_valid = 1'b0;
    err_addr  = '0;
    err_test  = '0;
    err_dout  = '0;
    for (int m = 0; m <= WAYS; m++)
      if (int'(err_sel) == m) begin
        err_valid = chk_valid[m];
        err_addr  = chk_addr[m];
        err_test  = chk_test[m];
        err_dout  = (m == 0) ? ERR_W'(chk_dout_t) : ERR_W'(chk_dout_d[m-1]);
      end
  end

  // ---------------------------------------------------------------- lookup
  logic [WAYS-1:0] hit_vec;
  logic            hit;
  logic [WW-1:0]   hit_way;
  logic [WW-1:0]   victim;
  logic            no_way;

  always_comb begin
    hit_vec = '0;
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = trow.meta[w].valid && !trow.ld[w] && trow.meta[w].tag == tag_q;
      if (hit_vec[w] && !hit) begin
        hit     = 1'b1;
        hit_way = WW'(w);
      end
    end
    // victim: first invalid enabled way, else rotate from rr_q over enabled ways
    no_way = 1'b1;
    victim = '0;
    for (int w = 0; w < WAYS; w++)
      if (no_way && !trow.ld[w] && !trow.meta[w].valid) begin
        no_way = 1'b0;
        victim = WW'(w);
      end
    for (int k = 0; k < WAYS; k++) begin
      logic [WW-1:0] w;
      w = WW'(rr_q + WW'(k));
      if (no_way && !trow.ld[w]) begin
        no_way = 1'b0;
        victim = w;
      end
    end
  end

  // RA for the data at the macro outputs: straight from the tag macro in
  // LOOKUP (read in parallel), from the held tag row afterwards.
  // The RA is kept as a SEC-DED code word of its own, checked (and, with
  // correction enabled, corrected) before it steers the shifters.
  logic [RA_W-1:0]  ra_dec;
  logic             ra_sec, ra_ded;
  logic [RA_CW-1:0] ra_cw_enc;
  secded_dec #(.K(RA_W)) u_ra_dec (
    .cw((state_q == S_LOOKUP) ? trow.ra_cw : trow_q.ra_cw), .corr_en(ecc_corr_en),
    .d(ra_dec), .single_err(ra_sec), .double_err(ra_ded));
  secded_enc #(.K(RA_W)) u_ra_enc (.d(RA_W'(cfg_q.val)), .cw(ra_cw_enc));
  assign ra_rd  = ra_dec;
  assign ra_cur = ra_dec;

  // line-aligned byte address of (tag, set) in this bank
  function automatic logic [PADDR_W-1:0] mk_line_addr(logic [TAG_W-1:0] t, logic [SET_W-1:0] s);
    return (PADDR_W'(t) << (SET_W + BANK_W + OFFS_W)) | (PADDR_W'(s) << (BANK_W + OFFS_W)) |
           (PADDR_W'(BANK_ID) << OFFS_W);
  endfunction

  logic [PADDR_W-1:0] line_addr;
  assign line_addr = mk_line_addr(tag_q, set_q);

  // ---------------------------------------------------------------- control
  always_comb begin
    req_ready     = (state_q == S_IDLE) && !bist_en && !(cfg_valid && cfg.op != RR_NOP);
    cfg_ready     = (state_q == S_IDLE) && !bist_en;
    resp_valid    = 1'b0;
    resp_rdata    = line_q[wi_q];
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = line_addr;
    for (int i = 0; i < WORDS; i++) mem_req_wdata[i*K +: K] = line_q[i];
    c_t_en    = 1'b0;
    c_t_we    = 1'b0;
    c_t_addr  = set_q;
    c_t_din   = trow_q;
    c_d_en    = '0;
    c_d_we    = '0;
    c_d_addr  = {set_q, wi_q};
    c_d_wdata = wdata_q;
    ev_ecc_single = (state_q == S_LOOKUP) && ra_sec;
    ev_ecc_double = (state_q == S_LOOKUP) && ra_ded;

    unique case (state_q)
      S_INIT: begin
        c_t_en   = !bist_en;
        c_t_we   = 1'b1;
        c_t_addr = SET_W'(init_q);
        c_t_din  = '0;
      end
      S_IDLE: begin
        if (cfg_valid && cfg_ready && (cfg.op == RR_DCR_RA || cfg.op == RR_LD)) begin
          c_t_en   = 1'b1;
          c_t_addr = SET_W'(cfg.row);
        end else if (req_valid && req_ready) begin
          c_t_en   = 1'b1;
          c_t_addr = req_addr[OFFS_W+BANK_W +: SET_W];
          c_d_en   = '1;
          c_d_addr = {req_addr[OFFS_W+BANK_W +: SET_W], req_addr[BO_W +: WI_W]};
        end
      end
      S_CFG: begin
        c_t_en   = 1'b1;
        c_t_we   = 1'b1;
        c_t_addr = SET_W'(cfg_q.row);
        c_t_din  = trow;
        if (cfg_q.op == RR_DCR_RA) c_t_din.ra_cw = ra_cw_enc;
        else                       c_t_din.ld[cfg_q.idx[WW-1:0]] = cfg_q.flag;
      end
      S_LOOKUP: begin
        if (hit) begin
          if (we_q) begin
            c_d_en[hit_way] = 1'b1;
            c_d_we[hit_way] = 1'b1;
            c_t_en  = 1'b1;
            c_t_we  = 1'b1;
            c_t_din = trow;
            c_t_din.meta[hit_way].dirty = 1'b1;
          end else begin
            ev_ecc_single = ev_ecc_single || rd_sec[hit_way];
            ev_ecc_double = ev_ecc_double || rd_ded[hit_way];
          end
          resp_valid = 1'b1;
          resp_rdata = rd_word[hit_way];
        end else if (!no_way && trow.meta[victim].valid && trow.meta[victim].dirty) begin
          c_d_en[victim] = 1'b1;      // first word of the write-back
          c_d_addr       = {set_q, WI_W'(0)};
        end
      end
      S_WB_RD: begin
        // word cnt_q-1 is at the macro output; issue word cnt_q
        ev_ecc_single = rd_sec[victim_q];
        ev_ecc_double = rd_ded[victim_q];
        if (cnt_q < (WI_W+1)'(WORDS)) begin
          c_d_en[victim_q] = 1'b1;
          c_d_addr         = {set_q, WI_W'(cnt_q)};
        end
      end
      S_WB_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = mk_line_addr(trow_q.meta[victim_q].tag, set_q);
      end
      S_FILL_REQ: begin
        mem_req_valid = 1'b1;
      end
      S_FILL_WR: begin
        if (cnt_q < (WI_W+1)'(WORDS)) begin
          c_d_en[victim_q] = 1'b1;
          c_d_we[victim_q] = 1'b1;
          c_d_addr         = {set_q, WI_W'(cnt_q)};
          c_d_wdata        = line_q[WI_W'(cnt_q)];
        end else begin
          c_t_en  = 1'b1;
          c_t_we  = 1'b1;
          c_t_din = trow_q;
          c_t_din.meta[victim_q] = '{valid: 1'b1, dirty: we_q, tag: tag_q};
        end
      end
      S_BYP_WR: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
      end
      S_RESP: resp_valid = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_INIT;
      init_q   <= '0;
      we_q     <= 1'b0;
      tag_q    <= '0;
      set_q    <= '0;
      wi_q     <= '0;
      wdata_q  <= '0;
      cfg_q    <= '0;
      trow_q   <= '0;
      victim_q <= '0;
      no_way_q <= 1'b0;
      rr_q     <= '0;
      cnt_q    <= '0;
      bist_q   <= 1'b0;
      for (int i = 0; i < WORDS; i++) line_q[i] <= '0;
    end else begin
      bist_q <= bist_en;
      if (bist_q && !bist_en) begin
        // BIST patterns overwrote the tags: clear them again
        state_q <= S_INIT;
        init_q  <= '0;
      end else begin
        unique case (state_q)
          S_INIT: if (!bist_en) begin
            init_q <= init_q + 1'b1;
            if (init_q == (SET_W+1)'(SETS - 1)) state_q <= S_IDLE;
          end
          S_IDLE: begin
            if (cfg_valid && cfg_ready && (cfg.op == RR_DCR_RA || cfg.op == RR_LD)) begin
              cfg_q   <= cfg;
              state_q <= S_CFG;
            end else if (req_valid && req_ready) begin
              we_q    <= req_we;
              tag_q   <= req_addr[PADDR_W-1 -: TAG_W];
              set_q   <= req_addr[OFFS_W+BANK_W +: SET_W];
              wi_q    <= req_addr[BO_W +: WI_W];
              wdata_q <= req_wdata;
              state_q <= S_LOOKUP;
            end
          end
          S_CFG: state_q <= S_IDLE;
          S_LOOKUP: begin
            trow_q   <= trow;
            victim_q <= victim;
            no_way_q <= no_way;
            cnt_q    <= (WI_W+1)'(1);
            if (hit) state_q <= S_IDLE;
            else if (!no_way && trow.meta[victim].valid && trow.meta[victim].dirty)
              state_q <= S_WB_RD;
            else state_q <= S_FILL_REQ;
          end
          S_WB_RD: begin
            line_q[WI_W'(cnt_q - 1'b1)] <= rd_word[victim_q];
            cnt_q <= cnt_q + 1'b1;
            if (cnt_q == (WI_W+1)'(WORDS)) state_q <= S_WB_REQ;
          end
          S_WB_REQ: if (mem_req_ready) state_q <= S_FILL_REQ;
          S_FILL_REQ: if (mem_req_ready) state_q <= S_FILL_WAIT;
          S_FILL_WAIT: if (mem_resp_valid) begin
            for (int i = 0; i < WORDS; i++)
              line_q[i] <= (we_q && WI_W'(i) == wi_q) ? wdata_q : mem_resp_rdata[i*K +: K];
            cnt_q <= '0;
            if (no_way_q) state_q <= we_q ? S_BYP_WR : S_RESP;
            else          state_q <= S_FILL_WR;
          end
          S_FILL_WR: begin
            cnt_q <= cnt_q + 1'b1;
            if (cnt_q == (WI_W+1)'(WORDS)) begin
              rr_q    <= victim_q + 1'b1;
              state_q <= S_RESP;
            end
          end
          S_BYP_WR: if (mem_req_ready) state_q <= S_RESP;
          S_RESP: state_q <= S_IDLE;
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

endmodule
