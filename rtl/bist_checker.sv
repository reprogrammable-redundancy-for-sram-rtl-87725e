// bist_checker: per-SRAM comparator and error buffer of the BIST.
//
// Sits at the output of one macro. When the BIST issues a read of a row the
// macro has, the expected bit and the address are registered; one cycle
// later, when the macro's data is out, it is compared with the expected
// word (the expected bit replicated over the width). A mismatch pushes an
// error entry {address, dout, current test} into a small FIFO that the host
// drains through the control registers. 'almost_full' tells the sequencer to
// pause so that the operations already in flight still find room; an
// 'overflow' sticky bit records any entry that was lost anyway.
module bist_checker
  import rr_pkg::*;
#(
  parameter int unsigned WIDTH = 138,
  parameter int unsigned DEPTH = 2048,   // rows of this macro
  parameter int unsigned FIFO  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bist_op_t         op,
  input  logic [WIDTH-1:0] dout,
  output logic             err_valid,
  output logic [15:0]      err_addr,
  output logic [WIDTH-1:0] err_dout,
  output logic [7:0]       err_test,
  input  logic             err_pop,
  output logic             almost_full,
  output logic             overflow
);

  localparam int unsigned PW = $clog2(FIFO);

  logic        chk_q, exp_q;
  logic [15:0] addr_q;
  logic [7:0]  test_q;

  logic [15:0]      f_addr [FIFO];
  logic [WIDTH-1:0] f_dout [FIFO];
  logic [7:0]       f_test [FIFO];
  logic [PW-1:0]    rd_q, wr_q;
  logic [PW:0]      cnt_q;

  logic mismatch, push, pop;
  assign mismatch = chk_q && (dout != {WIDTH{exp_q}});
  assign pop      = err_pop && (cnt_q != '0);
  assign push     = mismatch && (cnt_q != (PW+1)'(FIFO) || pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_q    <= 1'b0;
      exp_q    <= 1'b0;
      addr_q   <= '0;
      test_q   <= '0;
      rd_q     <= '0;
      wr_q     <= '0;
      cnt_q    <= '0;
      overflow <= 1'b0;
    end else begin
      chk_q  <= op.en && !op.we && (int'(op.addr) < DEPTH);
      exp_q  <= op.dbit;
      addr_q <= op.addr;
      test_q <= op.test;
      if (push) begin
        f_addr[wr_q] <= addr_q;
        f_dout[wr_q] <= dout;
        f_test[wr_q] <= test_q;
        wr_q         <= (wr_q == PW'(FIFO - 1)) ? '0 : wr_q + 1'b1;
      end
      if (pop) rd_q <= (rd_q == PW'(FIFO - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
      if (mismatch && !push) overflow <= 1'b1;
    end
  end

  assign err_valid   = (cnt_q != '0);
  assign err_addr    = f_addr[rd_q];
  assign err_dout    = f_dout[rd_q];
  assign err_test    = f_test[rd_q];
  assign almost_full = (cnt_q >= (PW+1)'(FIFO - 2));

endmodule
