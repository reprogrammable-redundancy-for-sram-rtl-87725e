// tb_rr_cache_top: end-to-end run of the whole cache system at its real
// sizes (16-KB and 32-KB L1s, 1-MB L2 in four banks).
//  1. Failing bitcells are placed in tag and data macros of the L1 and L2.
//  2. The host runs March BIST in both domains through the control
//     registers with two data backgrounds, draining the error buffers
//     while the test runs (the sequencer stalls when a buffer fills).
//  3. From the logged {row, dout} entries it derives the repairs as the
//     programming flow does: a tag error -> BB entry; the first failing
//     data column of a set -> the set's DCR redundancy address; a further
//     failing column in that set -> line disable of that way.
//  4. It programs BB, then DCR, then LD, and runs random data-cache reads
//     and writes plus instruction fetches, checked against a reference
//     memory, with SEC-DED correction off: no SEC-DED error may be logged.
// Counts how often each mechanism acted (BIST errors, BIST stall, BB
// entries, DCR redundancy addresses, line disables, BB read substitution,
// DCR-shifted accesses, L1 and L2 misses, L2 write-backs) and fails for
// any that never did.
module tb_rr_cache_top;
  import rr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic if_req_valid = 0, if_req_ready, if_resp_valid;
  logic [PADDR_W-1:0] if_req_addr = '0;
  logic [127:0] if_resp_rdata;
  logic d_req_valid = 0, d_req_ready, d_req_we = 0, d_resp_valid;
  logic [PADDR_W-1:0] d_req_addr = '0;
  logic [63:0] d_req_wdata = '0, d_resp_rdata;
  logic scr_we = 0;
  logic [7:0] scr_addr = '0;
  logic [31:0] scr_wdata = '0, scr_rdata;
  logic mv, mr = 0, mw, mresp = 0;
  logic [PADDR_W-1:0] ma;
  logic [LINE_W-1:0] md, mrd;
  int checks = 0, failures = 0;

  rr_cache_top dut (.*,
    .mem_req_valid(mv), .mem_req_ready(mr), .mem_req_we(mw), .mem_req_addr(ma),
    .mem_req_wdata(md), .mem_resp_valid(mresp), .mem_resp_rdata(mrd));
  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ memory
  logic [LINE_W-1:0] mem [logic [PADDR_W-1:0]];
  function automatic logic [LINE_W-1:0] pat(logic [PADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = a * 32'h9e3779b1 + 32'(i) * 32'h85ebca6b;
    return l;
  endfunction
  logic [PADDR_W-1:0] rd_addr;
  int delay = -1, n_l2_wb = 0, n_mem_rd = 0;
  always @(posedge clk) begin
    mresp <= 1'b0;
    mr    <= 1'($urandom_range(3) != 0);
    if (delay == 0) begin
      mresp <= 1'b1;
      mrd   <= mem.exists(rd_addr) ? mem[rd_addr] : pat(rd_addr);
    end
    if (delay >= 0) delay <= delay - 1;
    if (mv && mr && rst_n) begin
      if (mw) begin mem[ma] = md; n_l2_wb++; end
      else begin rd_addr <= ma; delay <= $urandom_range(4); n_mem_rd++; end
    end
  end

  // ------------------------------------------------------------ monitors
  int n_stall = 0, n_bb_sub = 0, n_dcr_acc = 0, n_l1_miss = 0, n_l2_miss = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_bist_l2.busy && dut.u_bist_l2.stall) n_stall++;
    if (dut.u_bist_l1.busy && dut.u_bist_l1.stall) n_stall++;
    // BB substitution on a functional read of the repaired L2 tag row
    if (dut.g_l2[2].u_bank.state_q == 4'd2 && dut.g_l2[2].u_bank.set_q == 9'd33) n_bb_sub++;
    if (dut.g_l2[1].u_bank.state_q == 4'd2 && dut.g_l2[1].u_bank.ra_rd != '0) n_dcr_acc++;
    if (dut.u_dcache.state_q == 4'd2 && !dut.u_dcache.hit) n_l1_miss++;
    for (int b = 0; b < 4; b++) ;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.g_l2[0].u_bank.state_q == 4'd2 && !dut.g_l2[0].u_bank.hit) n_l2_miss++;
    if (dut.g_l2[1].u_bank.state_q == 4'd2 && !dut.g_l2[1].u_bank.hit) n_l2_miss++;
    if (dut.g_l2[2].u_bank.state_q == 4'd2 && !dut.g_l2[2].u_bank.hit) n_l2_miss++;
    if (dut.g_l2[3].u_bank.state_q == 4'd2 && !dut.g_l2[3].u_bank.hit) n_l2_miss++;
  end

  // ------------------------------------------------------------ SCR access
  task automatic scr_w(int a, logic [31:0] v);
    @(negedge clk); scr_we = 1; scr_addr = 8'(a); scr_wdata = v;
    @(negedge clk); scr_we = 0;
  endtask
  task automatic scr_r(int a, output logic [31:0] v);
    @(negedge clk); scr_addr = 8'(a);
    #1 v = scr_rdata;
  endtask

  // macro widths and per-cache geometry
  function automatic int tag_w(int t);
    return (t == 0) ? 57 : (t == 1) ? 100 : 157;   // tags + LD + RA code word
  endfunction
  function automatic int data_w(int t);
    return (t == 1) ? 73 : 138;
  endfunction
  function automatic int n_ways(int t);
    return (t == 0) ? 2 : (t == 1) ? 4 : 8;
  endfunction
  function automatic int n_words(int t);
    return (t == 1) ? 8 : 4;
  endfunction

  // repair plan built from the BIST log
  typedef struct { int row; int col[2]; int ncol; } bb_t;
  bb_t bb [6][$];
  int  ra_col [6][int];          // set -> failing column of its RA
  int  ld [6][int][int];         // set -> way -> 1
  int  n_err_tag = 0, n_err_data = 0;

  task automatic log_error(int t, int m, logic [15:0] row, logic [255:0] d);
    int w = (m == 0) ? tag_w(t) : data_w(t);
    int ones = 0;
    bit maj;
    for (int i = 0; i < w; i++) ones += int'(d[i]);
    maj = (ones * 2 > w);
    for (int c = 0; c < w; c++) if (d[c] != maj) begin
      if (m == 0) begin
        int found = -1;
        n_err_tag++;
        foreach (bb[t][i]) if (bb[t][i].row == int'(row)) found = i;
        if (found < 0) begin
          bb[t].push_back('{int'(row), '{c, 0}, 1});
        end else begin
          bit have = 0;
          for (int s = 0; s < bb[t][found].ncol; s++) if (bb[t][found].col[s] == c) have = 1;
          if (!have && bb[t][found].ncol < 2) begin
            bb[t][found].col[bb[t][found].ncol] = c;
            bb[t][found].ncol++;
          end
        end
      end else begin
        int set = int'(row) / n_words(t);
        n_err_data++;
        if (!ra_col[t].exists(set)) ra_col[t][set] = c;        // first error in the set
        else if (ra_col[t][set] != c) ld[t][set][m - 1] = 1;   // already an error there
      end
    end
  endtask

  task automatic drain_errors();
    logic [31:0] v, info;
    logic [255:0] d;
    for (int t = 0; t < N_TARGETS; t++)
      for (int m = 0; m <= n_ways(t); m++) begin
        scr_w(3, 32'((m << 4) | t));
        scr_r(3, v);
        while (v[8]) begin
          scr_r(4, info);
          for (int i = 0; i < 8; i++) begin
            scr_r(8 + i, v);
            d[i*32 +: 32] = v;
          end
          log_error(t, m, info[15:0], d);
          scr_w(4, 0);
          scr_r(3, v);
        end
      end
  endtask

  task automatic run_bist(int test, bit alt);
    logic [31:0] st;
    scr_w(1, {15'b0, alt, 8'(test), 8'b0000_0011});
    do begin
      drain_errors();
      scr_r(2, st);
    end while (st[1:0] != 2'b00);
    drain_errors();
    checks++;
    if (st[3:2] != 2'b00) begin failures++; $display("FAIL BIST error buffer overflow"); end
  endtask

  task automatic rr_cmd(rr_op_e op, int t, int idx, bit slot, bit flag, int val, int row);
    rr_cmd_t c;
    logic [31:0] v;
    c = '0; c.op = op; c.target = rr_target_e'(t); c.idx = 5'(idx); c.slot = slot;
    c.flag = flag; c.val = 8'(val); c.row = 11'(row);
    scr_w(0, 32'(c));
    do scr_r(0, v); while (v[0]);
  endtask

  // ------------------------------------------------------------ traffic
  logic [63:0] refm [logic [PADDR_W-1:0]];
  function automatic logic [63:0] ref64(logic [PADDR_W-1:0] a);
    logic [LINE_W-1:0] l = pat({a[PADDR_W-1:6], 6'b0});
    if (refm.exists(a)) return refm[a];
    return l[a[5:3]*64 +: 64];
  endfunction

  task automatic d_access(bit we, logic [PADDR_W-1:0] a, logic [63:0] wd);
    @(negedge clk);
    d_req_valid = 1; d_req_we = we; d_req_addr = a; d_req_wdata = wd;
    do @(posedge clk); while (!d_req_ready);
    #1 d_req_valid = 0;
    while (!d_resp_valid) @(posedge clk);
    #1;
    if (we) refm[a] = wd;
    else begin
      checks++;
      if (d_resp_rdata !== ref64(a)) begin
        failures++;
        if (failures < 10) $display("FAIL D$ read %h got %h exp %h", a, d_resp_rdata, ref64(a));
      end
    end
  endtask

  task automatic i_fetch(logic [PADDR_W-1:0] a);
    logic [LINE_W-1:0] l = pat({a[PADDR_W-1:6], 6'b0});
    @(negedge clk);
    if_req_valid = 1; if_req_addr = a;
    do @(posedge clk); while (!if_req_ready);
    #1 if_req_valid = 0;
    while (!if_resp_valid) @(posedge clk);
    #1;
    checks++;
    if (if_resp_rdata !== l[a[5:4]*128 +: 128]) begin
      failures++;
      if (failures < 10) $display("FAIL I$ fetch %h", a);
    end
  endtask

  // address groups that land on the faulty sets
  function automatic logic [PADDR_W-1:0] pick_daddr();
    int g = $urandom_range(4);
    logic [PADDR_W-1:0] low;
    case (g)
      0: low = 32'h0000_0A40;               // L2 bank 1, set 10 (DCR + LD)
      1: low = 32'h0000_2180;               // L2 bank 2, set 33 (BB)
      2: low = 32'h0000_0100;               // D$ set 4 (DCR)
      3: low = 32'h0000_1E00;               // L2 bank 0, set 30
      default: low = 32'(($urandom_range(127) << 6));
    endcase
    // 16 tags per group: more than the L2's 8 ways and the D$'s 4 ways
    return (32'($urandom_range(15)) << 17) | low | 32'($urandom_range(7) << 3);
  endfunction

  initial begin
    logic [31:0] v;
    // ---- 1. failing bitcells
    dut.g_l2[1].u_bank.g_way[3].u_data.inject_fault(10 * 4 + 1, 20, 1'b1);
    dut.g_l2[1].u_bank.g_way[5].u_data.inject_fault(10 * 4 + 3, 90, 1'b0);
    dut.g_l2[1].u_bank.g_way[6].u_data.inject_fault(10 * 4 + 2, 20, 1'b0);
    dut.g_l2[0].u_bank.g_way[0].u_data.inject_fault(30 * 4, 137, 1'b1);   // spare column
    dut.g_l2[2].u_bank.u_tag.inject_fault(33, 5, 1'b1);
    dut.g_l2[2].u_bank.u_tag.inject_fault(33, 151, 1'b0);                 // RA bit
    dut.u_dcache.g_way[1].u_data.inject_fault(4 * 8 + 3, 7, 1'b1);
    dut.u_icache.u_tag.inject_fault(2, 1, 1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d_req_ready && if_req_ready);

    // ---- 2. BIST, two backgrounds
    run_bist(1, 1'b0);
    run_bist(2, 1'b1);
    // ---- 3./4. program BB, then DCR, then LD
    for (int t = 0; t < N_TARGETS; t++) begin
      foreach (bb[t][i]) begin
        rr_cmd(RR_BB_ROW, t, i, 0, 1, 0, bb[t][i].row);
        for (int s = 0; s < bb[t][i].ncol; s++) rr_cmd(RR_BB_COL, t, i, 1'(s), 1, bb[t][i].col[s], 0);
      end
    end
    for (int t = 0; t < N_TARGETS; t++)
      foreach (ra_col[t][set]) rr_cmd(RR_DCR_RA, t, 0, 0, 0, ra_col[t][set] + 1, set);
    for (int t = 0; t < N_TARGETS; t++)
      foreach (ld[t][set]) foreach (ld[t][set][w]) rr_cmd(RR_LD, t, w, 0, 1, 0, set);

    $display("BIST errors: tag %0d data %0d; BB rows L2b2=%0d I$=%0d; RA sets L2b1=%0d D$=%0d; LD L2b1=%0d",
             n_err_tag, n_err_data, bb[4].size(), bb[0].size(), ra_col[3].num(), ra_col[1].num(),
             ld[3].num());
    checks += 6;
    if (bb[4].size() != 1 || bb[4][0].ncol != 2) begin failures++; $display("FAIL L2 BB plan"); end
    if (bb[0].size() != 1) begin failures++; $display("FAIL I$ BB plan"); end
    if (!ra_col[3].exists(10) || ra_col[3][10] != 20) begin failures++; $display("FAIL L2 RA plan"); end
    if (!ld[3].exists(10) || !ld[3][10].exists(5) || ld[3][10].num() != 1) begin failures++; $display("FAIL LD plan"); end
    if (!ra_col[1].exists(4) || ra_col[1][4] != 7) begin failures++; $display("FAIL D$ RA plan"); end
    if (!ra_col[2].exists(30) || ra_col[2][30] != 137) begin failures++; $display("FAIL spare plan"); end

    // ---- traffic
    for (int n = 0; n < 2500; n++) begin
      if (n % 5 == 4) i_fetch(32'h8000_0000 | (32'($urandom_range(15)) << 13) |
                              ((n % 10 == 4) ? 32'h80 : 32'($urandom_range(127) << 6)) |
                              32'($urandom_range(3) << 4));
      else d_access(1'($urandom_range(2) == 0), pick_daddr(), {$urandom, $urandom});
    end
    // read back everything written
    foreach (refm[a]) d_access(0, a, '0);

    scr_r(6, v);
    checks++;
    if (v != 0) begin failures++; $display("FAIL %0d single-bit SEC-DED errors after repair", v); end
    scr_r(7, v);
    checks++;
    if (v != 0) begin failures++; $display("FAIL %0d double-bit SEC-DED errors after repair", v); end

    $display("mechanisms: bist_err=%0d stall=%0d bb_rows=%0d bb_reads=%0d dcr_acc=%0d ld=%0d l1_miss=%0d l2_miss=%0d l2_wb=%0d",
             n_err_tag + n_err_data, n_stall, bb[4].size() + bb[0].size(), n_bb_sub, n_dcr_acc,
             ld[3].num(), n_l1_miss, n_l2_miss, n_l2_wb);
    checks += 9;
    if (n_err_tag == 0)  begin failures++; $display("FAIL no tag error found"); end
    if (n_err_data == 0) begin failures++; $display("FAIL no data error found"); end
    if (n_stall == 0)    begin failures++; $display("FAIL BIST never stalled"); end
    if (n_bb_sub == 0)   begin failures++; $display("FAIL repaired tag row never read"); end
    if (n_dcr_acc == 0)  begin failures++; $display("FAIL no DCR-shifted access"); end
    if (n_l1_miss == 0)  begin failures++; $display("FAIL no L1 miss"); end
    if (n_l2_miss == 0)  begin failures++; $display("FAIL no L2 miss"); end
    if (n_l2_wb == 0)    begin failures++; $display("FAIL no L2 write-back"); end
    if (ld[3].num() == 0) begin failures++; $display("FAIL no line disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
