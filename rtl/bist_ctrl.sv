// bist_ctrl: at-speed SRAM BIST sequencer.
//
// One controller drives every SRAM of a voltage domain in parallel: each
// cycle it broadcasts a read or a write (address, data bit, and for a read
// the expected data) that all macros of the domain execute at once; each
// macro's own bist_checker compares the result. Arrays shallower than the
// deepest one ignore rows they do not have. The document names March tests
// but not which ones; this sequencer runs March C- (10n operations):
//   up/down(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up/down(r0)
// with a data background chosen at start: solid (alt = 0) or alternating
// by row (alt = 1, data bit XOR row bit 0). The host runs it repeatedly with
// different backgrounds and test numbers; the test number is logged with
// every error.
//
// Interface: start (pulse) with test/alt sampled; busy while running; done
// pulses after the last operation. 'stall' holds the sequence (asserted while
// an error buffer is nearly full). One operation per unstalled cycle.
module bist_ctrl
  import rr_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,   // rows of the deepest array
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] test,
  input  logic       alt,
  input  logic       stall,
  output bist_op_t   op,
  output logic       busy,
  output logic       done
);

  localparam int unsigned N_ELEM = 6;

  logic [2:0]    elem_q;
  logic          step_q;     // operation within the element
  logic [AW-1:0] addr_q;
  logic [7:0]    test_q;
  logic          alt_q;

  // per-element properties
  logic          down, two_ops, first_we, first_val;

  always_comb begin
    down      = (elem_q == 3'd3) || (elem_q == 3'd4);
    two_ops   = (elem_q >= 3'd1) && (elem_q <= 3'd4);
    first_we  = (elem_q == 3'd0);
    // value read (or written in element 0) by the first operation
    first_val = (elem_q == 3'd2) || (elem_q == 3'd4);
  end

  logic last_addr;
  assign last_addr = down ? (addr_q == '0) : (addr_q == AW'(DEPTH - 1));

  always_comb begin
    op      = '0;
    op.en   = busy && !stall;
    op.we   = step_q ? 1'b1 : first_we;
    op.dbit = (step_q ? ~first_val : first_val) ^ (alt_q & addr_q[0]);
    op.addr = 16'(addr_q);
    op.test = test_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      elem_q <= '0;
      step_q <= 1'b0;
      addr_q <= '0;
      test_q <= '0;
      alt_q  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          elem_q <= '0;
          step_q <= 1'b0;
          addr_q <= '0;
          test_q <= test;
          alt_q  <= alt;
        end
      end else if (!stall) begin
        if (two_ops && !step_q) begin
          step_q <= 1'b1;
        end else begin
          step_q <= 1'b0;
          if (!last_addr) begin
            addr_q <= down ? addr_q - 1'b1 : addr_q + 1'b1;
          end else if (elem_q == 3'(N_ELEM - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            elem_q <= elem_q + 1'b1;
            // elements 3 and 4 walk downwards
            addr_q <= (elem_q == 3'd2 || elem_q == 3'd3) ? AW'(DEPTH - 1) : '0;
          end
        end
      end
    end
  end

endmodule
