// tb_rr_control: drives the SCR bus of the control block. Checks that an RR
// command is held until its target cache is ready and reaches only that
// cache, that the pending bit reads back, that the ECC command sets the
// correction enable, that BIST start pulses and parameters appear, that
// error buffers are selected, read in 32-bit slices and popped, and that
// SEC-DED events are counted.
module tb_rr_control;
  import rr_pkg::*;
  localparam int unsigned ERR_W = 256;
  logic clk = 0, rst_n = 0;
  logic scr_we = 0;
  logic [7:0] scr_addr = '0;
  logic [31:0] scr_wdata = '0, scr_rdata;
  logic [N_TARGETS-1:0] cfg_valid, cfg_ready = '0, ev_s = '0, ev_d = '0, err_valid = '0, err_pop;
  rr_cmd_t cfg;
  logic ecc_en, alt;
  logic [1:0] bstart, bbusy = '0, bovf = '0;
  logic [7:0] btest;
  logic [3:0] esel;
  logic [N_TARGETS-1:0][15:0] eaddr;
  logic [N_TARGETS-1:0][7:0] etest;
  logic [N_TARGETS-1:0][ERR_W-1:0] edout;
  int checks = 0, failures = 0;

  rr_control #(.ERR_W(ERR_W)) dut (.clk, .rst_n, .scr_we, .scr_addr, .scr_wdata, .scr_rdata,
    .cfg_valid, .cfg_ready, .cfg, .ecc_corr_en(ecc_en), .ev_ecc_single(ev_s), .ev_ecc_double(ev_d),
    .bist_start(bstart), .bist_test(btest), .bist_alt(alt), .bist_busy(bbusy), .bist_overflow(bovf),
    .err_sel(esel), .err_valid, .err_addr(eaddr), .err_test(etest), .err_dout(edout), .err_pop);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [31:0] v);
    @(negedge clk); scr_we = 1; scr_addr = 8'(a); scr_wdata = v;
    @(negedge clk); scr_we = 0;
  endtask

  task automatic rchk(int a, logic [31:0] exp, string what);
    scr_addr = 8'(a);
    #1;
    chk(scr_rdata == exp, what);
  endtask

  int pops = 0;
  always @(posedge clk) if (err_pop[4]) pops++;

  initial begin
    rr_cmd_t c;
    for (int t = 0; t < N_TARGETS; t++) begin
      eaddr[t] = 16'(100 + t); etest[t] = 8'(t);
      for (int i = 0; i < ERR_W / 32; i++) edout[t][i*32 +: 32] = 32'((t << 8) | i);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // RR command held until the target is ready
    c = '0; c.op = RR_DCR_RA; c.target = TGT_L2B1; c.val = 8'd77; c.row = 11'd300;
    wr(0, 32'(c));
    repeat (3) begin
      chk(cfg_valid == 6'b001000 && cfg == c, "command offered to L2 bank 1 only");
      rchk(0, 32'd1, "pending bit");
      @(negedge clk);
    end
    cfg_ready[3] = 1;
    @(negedge clk);
    cfg_ready = '0;
    chk(cfg_valid == '0, "command taken");
    rchk(0, 32'd0, "pending bit clear");
    // ECC correction enable
    chk(ecc_en == 1'b0, "ECC correction off after reset");
    c = '0; c.op = RR_ECC_CFG; c.flag = 1'b1;
    wr(0, 32'(c));
    @(negedge clk);
    chk(ecc_en == 1'b1, "ECC correction on");
    rchk(5, 32'd1, "ECC enable register");
    // BIST start
    @(negedge clk); scr_we = 1; scr_addr = 8'h01; scr_wdata = 32'h0001_2a02;
    #1 chk(bstart == 2'b10, "BIST start pulse for L2");
    @(negedge clk); scr_we = 0;
    #1;
    chk(bstart == 2'b00 && btest == 8'h2a && alt == 1'b1, "BIST parameters");
    bbusy = 2'b10; bovf = 2'b01;
    rchk(2, 32'b0110, "BIST status");
    // error readout of L2 bank 2, data way 3
    wr(3, 32'h0000_0044);
    chk(esel == 4'd4, "macro select");
    err_valid[4] = 1;
    rchk(3, 32'h0000_0144, "selected buffer has an entry");
    rchk(4, {8'b0, 8'd4, 16'd104}, "error row and test");
    for (int i = 0; i < 8; i++) rchk(8 + i, 32'((4 << 8) | i), "dout slice");
    wr(4, 0);
    chk(pops == 1, "pop");
    // event counters
    @(negedge clk); ev_s = 6'b000101; ev_d = 6'b100000;
    @(negedge clk); ev_s = 6'b000001; ev_d = '0;
    @(negedge clk); ev_s = '0;
    @(negedge clk);
    rchk(6, 32'd3, "single-error count");
    rchk(7, 32'd1, "double-error count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
