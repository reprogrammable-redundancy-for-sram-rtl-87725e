// tb_rr_cache_bank: a small bank (4 ways, 16 sets, 128-bit words, 4 BB
// entries) in front of a behavioural line memory, with failing bitcells
// injected into its macros.
// Phase A (no repairs): a stuck cell in a data word shows up as a logged
// single-bit SEC-DED error and wrong data with correction off, and as the
// right data with correction on.
// Phase B (after reset): the faults are repaired the way the programming
// flow does it: BB entry for the tag fault, DCR redundancy address for the
// first failing data column of a set, line disable for a further failing
// line of that set, and all ways of one set disabled. Random reads and
// writes are then checked against a reference memory with correction off
// and no SEC-DED error may appear. Counts hits, misses, write-backs,
// memory-bypass accesses and DCR-shifted accesses, checks that no refill
// goes to a disabled way, and that a read hit answers one cycle after it
// is accepted.
// Phase C: a stuck cell in the RA code word of a repaired set must be
// reported by the RA's own SEC-DED check and, with correction on, must not
// change the RA that steers the shifters.
module tb_rr_cache_bank;
  import rr_pkg::*;
  localparam int unsigned WAYS = 4, SETS = 16, K = 128, WORDS = 4;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, resp_valid;
  logic [PADDR_W-1:0] req_addr = '0;
  logic [K-1:0] req_wdata = '0, resp_rdata;
  logic mv, mr, mw, mresp = 0;
  logic [PADDR_W-1:0] ma;
  logic [LINE_W-1:0] md, mrd;
  logic cfg_valid = 0, cfg_ready, corr_en = 0, ev_s, ev_d;
  rr_cmd_t cfg = '0;
  bist_op_t bop = '0;
  logic bstall, bovf, evld, epop = 0;
  logic [15:0] eaddr;
  logic [7:0] etest;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_byp = 0, n_dcr = 0, n_ecc = 0, n_ld_fill = 0;
  int n_ra_chk = 0, n_ra_bad = 0;
  bit phase_c = 0;
  // first tag-row bit of the RA code word: WAYS x {valid, dirty, tag}, then WAYS LD bits
  localparam int unsigned RA_LSB = WAYS * (PADDR_W - OFFS_W - $clog2(SETS) + 2) + WAYS;

  rr_cache_bank #(.WAYS(WAYS), .SETS(SETS), .K(K), .BB_ENTRIES(4), .BANK_W(0), .BANK_ID(0)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .mem_req_valid(mv), .mem_req_ready(mr), .mem_req_we(mw), .mem_req_addr(ma),
    .mem_req_wdata(md), .mem_resp_valid(mresp), .mem_resp_rdata(mrd),
    .cfg_valid, .cfg_ready, .cfg, .ecc_corr_en(corr_en), .ev_ecc_single(ev_s), .ev_ecc_double(ev_d),
    .bist_en(1'b0), .bist_op(bop), .bist_stall(bstall), .bist_overflow(bovf),
    .err_sel('0), .err_valid(evld), .err_addr(eaddr), .err_dout(), .err_test(etest), .err_pop(epop));
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- line memory
  logic [LINE_W-1:0] mem [logic [PADDR_W-1:0]];
  function automatic logic [LINE_W-1:0] pat(logic [PADDR_W-1:0] a);
    return {16{a * 32'h2545f491 + 32'h1234}};
  endfunction
  logic [PADDR_W-1:0] rd_addr;
  int delay = -1;
  always @(posedge clk) begin
    mresp <= 1'b0;
    mr    <= 1'($urandom_range(3) != 0);
    if (delay == 0) begin
      mresp <= 1'b1;
      mrd   <= mem.exists(rd_addr) ? mem[rd_addr] : pat(rd_addr);
    end
    if (delay >= 0) delay <= delay - 1;
    if (mv && mr) begin
      if (mw) begin
        mem[ma] = md;
        if (dut.state_q == 4'd4) n_wb++;   // S_WB_REQ
        else n_byp++;
      end else begin
        rd_addr <= ma;
        delay   <= $urandom_range(3);
      end
    end
  end

  // ---------------- event monitors
  always @(posedge clk) if (rst_n) begin
    if (ev_s || ev_d) n_ecc++;
    if (dut.state_q == 4'd2) begin   // S_LOOKUP
      if (dut.hit) n_hit++; else n_miss++;
      if (dut.ra_rd != '0) n_dcr++;
      if (phase_c && dut.set_q == 4'd3) begin
        n_ra_chk++;
        if (dut.ra_rd != 8'd11) n_ra_bad++;
      end
    end
    if (dut.state_q == 4'd7 && dut.trow_q.ld[dut.victim_q]) n_ld_fill++;
  end

  // ---------------- reference model
  logic [K-1:0] refm [logic [PADDR_W-1:0]];
  function automatic logic [K-1:0] ref_rd(logic [PADDR_W-1:0] a);
    logic [PADDR_W-1:0] la = {a[PADDR_W-1:6], 6'b0};
    logic [LINE_W-1:0] l = pat(la);
    if (refm.exists(a)) return refm[a];
    return l[a[5:4]*K +: K];
  endfunction

  function automatic logic [PADDR_W-1:0] mk(int tag, int set, int word);
    return PADDR_W'((tag << 10) | (set << 6) | (word << 4));
  endfunction

  task automatic access(bit we, logic [PADDR_W-1:0] a, logic [K-1:0] wd, output logic [K-1:0] rd,
                        output int lat);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    do @(posedge clk); while (!req_ready);
    #1;
    req_valid = 0;
    lat = 0;
    while (!resp_valid) begin
      @(posedge clk); #1;
      lat++;
    end
    rd = resp_rdata;
    @(posedge clk);
    #1;
  endtask

  task automatic prog(rr_op_e op, int idx, bit slot, bit flag, int val, int row);
    @(negedge clk);
    cfg = '0; cfg.op = op; cfg.idx = 5'(idx); cfg.slot = slot; cfg.flag = flag;
    cfg.val = 8'(val); cfg.row = 11'(row);
    cfg_valid = 1;
    do @(posedge clk); while (!cfg_ready);
    #1;
    cfg_valid = 0;
    repeat (2) @(posedge clk);
  endtask

  task automatic check_rd(logic [PADDR_W-1:0] a);
    logic [K-1:0] rd;
    int lat;
    access(0, a, '0, rd, lat);
    checks++;
    if (rd !== ref_rd(a)) begin
      failures++;
      if (failures < 10) $display("FAIL read %h got %h exp %h", a, rd, ref_rd(a));
    end
  endtask

  task automatic do_wr(logic [PADDR_W-1:0] a, logic [K-1:0] v);
    logic [K-1:0] rd;
    int lat;
    access(1, a, v, rd, lat);
    refm[a] = v;
  endtask

  task automatic reset_bank();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (req_ready);
  endtask

  initial begin
    logic [K-1:0] rd;
    int lat, e0;
    // failing bitcells
    dut.g_way[1].u_data.inject_fault(3 * WORDS + 2, 10, 1'b1);   // set 3: single column
    dut.g_way[2].u_data.inject_fault(5 * WORDS + 0, 4, 1'b0);    // set 5: first failing line
    dut.g_way[0].u_data.inject_fault(5 * WORDS + 1, 50, 1'b1);   // set 5: second failing line
    dut.u_tag.inject_fault(7, 3, 1'b1);                          // tag row 7, way 0 tag bit 3
    reset_bank();

    // ---- phase A: the data fault is visible without repair
    for (int t = 0; t < 4; t++) check_rd(mk(t, 3, 0));            // fill set 3, way t
    e0 = n_ecc;
    do_wr(mk(1, 3, 2), '0);                                        // way 1, word 2
    access(0, mk(1, 3, 2), '0, rd, lat);
    checks += 3;
    $display("phase A: rd=%h ecc=%0d lat=%0d", rd, n_ecc - e0, lat);
    if (rd[10] !== 1'b1) failures++;                               // stuck bit seen, not corrected
    if (n_ecc != e0 + 1) failures++;                               // ... and logged
    if (lat != 0) failures++;                                      // answer in the cycle after acceptance
    corr_en = 1;
    access(0, mk(1, 3, 2), '0, rd, lat);
    checks++;
    if (rd !== '0) failures++;
    corr_en = 0;
    // write the line back so the reference stays valid across the reset
    for (int t = 4; t < 8; t++) check_rd(mk(t, 3, 0));
    refm[mk(1, 3, 2)] = mem[mk(1, 3, 0)][2*K +: K];

    // ---- phase B: repair and run
    reset_bank();
    prog(RR_BB_ROW, 0, 0, 1, 0, 7);
    prog(RR_BB_COL, 0, 0, 1, 3, 0);
    prog(RR_DCR_RA, 0, 0, 0, 10 + 1, 3);
    prog(RR_DCR_RA, 0, 0, 0, 4 + 1, 5);
    prog(RR_LD, 0, 0, 1, 0, 5);
    for (int w = 0; w < WAYS; w++) prog(RR_LD, w, 0, 1, 0, 9);
    checks++;
    if (dut.u_bb.ent[0].vld !== 1'b1) failures++;

    e0 = n_ecc;
    for (int n = 0; n < 1500; n++) begin
      int set;
      logic [PADDR_W-1:0] a;
      set = (n % 3 == 0) ? 3 : (n % 3 == 1) ? 5 : $urandom_range(SETS - 1);
      if (n % 7 == 0) set = 7;
      if (n % 11 == 0) set = 9;
      a = mk($urandom_range(7), set, $urandom_range(WORDS - 1));
      if ($urandom_range(2) == 0) do_wr(a, {$urandom, $urandom, $urandom, $urandom});
      else check_rd(a);
    end
    // read-hit latency after repair
    check_rd(mk(2, 3, 2));
    access(0, mk(2, 3, 2), '0, rd, lat);
    checks += 2;
    if (lat != 0) failures++;
    if (rd !== ref_rd(mk(2, 3, 2))) failures++;

    checks += 7;
    if (n_ecc != e0) begin failures++; $display("FAIL %0d ECC events after repair", n_ecc - e0); end
    if (n_hit == 0)  begin failures++; $display("FAIL no hits"); end
    if (n_miss == 0) begin failures++; $display("FAIL no misses"); end
    if (n_wb == 0)   begin failures++; $display("FAIL no write-backs"); end
    if (n_byp == 0)  begin failures++; $display("FAIL no disabled-set bypass writes"); end
    if (n_dcr == 0)  begin failures++; $display("FAIL no DCR-shifted access"); end
    if (n_ld_fill != 0) begin failures++; $display("FAIL refill into a disabled way"); end
    // ---- phase C: a failing cell inside the stored RA code word of set 3
    // (RA 11 reads as 3 without correction): the RA's own SEC-DED check
    // reports it, and with correction on the shifters still get RA 11.
    dut.u_tag.inject_fault(3, RA_LSB + 3, 1'b0);
    corr_en = 1;
    phase_c = 1;
    e0 = n_ecc;
    for (int n = 0; n < 40; n++) check_rd(mk(n % 8, 3, n % WORDS));
    phase_c = 0;
    corr_en = 0;
    checks += 3;
    if (n_ecc == e0)   begin failures++; $display("FAIL RA code-word error not reported"); end
    if (n_ra_chk == 0) begin failures++; $display("FAIL no set-3 lookups in phase C"); end
    if (n_ra_bad != 0) begin failures++; $display("FAIL RA not corrected in %0d lookups", n_ra_bad); end

    $display("hits=%0d misses=%0d writebacks=%0d bypass=%0d dcr=%0d", n_hit, n_miss, n_wb, n_byp, n_dcr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
