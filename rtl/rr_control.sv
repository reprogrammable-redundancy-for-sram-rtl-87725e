// rr_control: system control registers (SCR) for BIST and reprogrammable
// redundancy.
//
// The host reaches the chip through a 32-bit register bus. Through it, it
// runs the BIST of either voltage domain, drains the per-SRAM error buffers,
// and programs the repairs with 32-bit RR commands (rr_pkg::rr_cmd_t): a BB
// entry's row or column slot, a set's DCR redundancy address, a way's
// line-disable bit, or the SEC-DED correction enable. A command is held
// until its target cache is idle and takes it. SEC-DED single/double error
// events from every cache are counted so that errors are logged, not hidden.
//
// Register map (word addresses, own choice):
//   0x00 W: RR command            R: [0] command pending
//   0x01 W: BIST start: [0] L1 domain, [1] L2 domain, [15:8] test number,
//           [16] alternating background
//   0x02 R: [0] L1 BIST busy, [1] L2 BIST busy, [2] L1 overflow, [3] L2 overflow
//   0x03 W/R: error select: [2:0] cache (rr_target_e), [7:4] macro (0 = tag,
//           w+1 = data way w); R: [8] selected buffer has an entry
//   0x04 R: [15:0] error row, [23:16] test number   W: pop the entry
//   0x05 R: SEC-DED correction enable
//   0x06 R: single-error count   0x07 R: double-error count
//   0x08..0x0F R: 32-bit slices of the failing row's data (dout)
// Reads are combinational; writes take effect on the clock edge.
module rr_control
  import rr_pkg::*;
#(
  parameter int unsigned ERR_W = 256
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // SCR bus
  input  logic                              scr_we,
  input  logic [7:0]                        scr_addr,
  input  logic [31:0]                       scr_wdata,
  output logic [31:0]                       scr_rdata,
  // RR programming to the caches
  output logic [N_TARGETS-1:0]              cfg_valid,
  input  logic [N_TARGETS-1:0]              cfg_ready,
  output rr_cmd_t                           cfg,
  output logic                              ecc_corr_en,
  input  logic [N_TARGETS-1:0]              ev_ecc_single,
  input  logic [N_TARGETS-1:0]              ev_ecc_double,
  // BIST
  output logic [1:0]                        bist_start,
  output logic [7:0]                        bist_test,
  output logic                              bist_alt,
  input  logic [1:0]                        bist_busy,
  input  logic [1:0]                        bist_overflow,
  output logic [3:0]                        err_sel,
  input  logic [N_TARGETS-1:0]              err_valid,
  input  logic [N_TARGETS-1:0][15:0]        err_addr,
  input  logic [N_TARGETS-1:0][7:0]         err_test,
  input  logic [N_TARGETS-1:0][ERR_W-1:0]   err_dout,
  output logic [N_TARGETS-1:0]              err_pop
);

  logic        pend_q;
  rr_cmd_t     cmd_q;
  logic [2:0]  tsel_q;
  logic [3:0]  msel_q;
  logic [31:0] n_single_q, n_double_q;

  assign cfg     = cmd_q;
  assign err_sel = msel_q;

  always_comb begin
    cfg_valid = '0;
    if (pend_q && cmd_q.op != RR_ECC_CFG && int'(cmd_q.target) < N_TARGETS)
      cfg_valid[cmd_q.target] = 1'b1;
  end

  logic taken;
  assign taken = pend_q && (cmd_q.op == RR_ECC_CFG || int'(cmd_q.target) >= N_TARGETS ||
                            cfg_ready[cmd_q.target]);

  always_comb begin
    bist_start = '0;
    if (scr_we && scr_addr == 8'h01) bist_start = scr_wdata[1:0];
    err_pop = '0;
    if (scr_we && scr_addr == 8'h04 && int'(tsel_q) < N_TARGETS) err_pop[tsel_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q      <= 1'b0;
      cmd_q       <= '0;
      tsel_q      <= '0;
      msel_q      <= '0;
      ecc_corr_en <= 1'b0;
      bist_test   <= '0;
      bist_alt    <= 1'b0;
      n_single_q  <= '0;
      n_double_q  <= '0;
    end else begin
      if (taken) begin
        pend_q <= 1'b0;
        if (cmd_q.op == RR_ECC_CFG) ecc_corr_en <= cmd_q.flag;
      end
      if (scr_we) begin
        unique case (scr_addr)
          8'h00: if (!pend_q || taken) begin
            cmd_q  <= rr_cmd_t'(scr_wdata);
            pend_q <= 1'b1;
          end
          8'h01: begin
            bist_test <= scr_wdata[15:8];
            bist_alt  <= scr_wdata[16];
          end
          8'h03: begin
            tsel_q <= scr_wdata[2:0];
            msel_q <= scr_wdata[7:4];
          end
          default: ;
        endcase
      end
      n_single_q <= n_single_q + 32'($countones(ev_ecc_single));
      n_double_q <= n_double_q + 32'($countones(ev_ecc_double));
    end
  end

  always_comb begin
    scr_rdata = '0;
    unique case (scr_addr)
      8'h00: scr_rdata = {31'b0, pend_q};
      8'h02: scr_rdata = {28'b0, bist_overflow, bist_busy};
      8'h03: scr_rdata = {23'b0, (int'(tsel_q) < N_TARGETS) && err_valid[tsel_q], msel_q, 1'b0, tsel_q};
      8'h04: if (int'(tsel_q) < N_TARGETS)
               scr_rdata = {8'b0, err_test[tsel_q], err_addr[tsel_q]};
      8'h05: scr_rdata = {31'b0, ecc_corr_en};
      8'h06: scr_rdata = n_single_q;
      8'h07: scr_rdata = n_double_q;
      default:
        if (scr_addr[7:3] == 5'b00001 && int'(tsel_q) < N_TARGETS)
          scr_rdata = err_dout[tsel_q][scr_addr[2:0]*32 +: 32];
    endcase
  end

endmodule
