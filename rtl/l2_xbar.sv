// l2_xbar: crossbar network between the L1 caches and the banked L2.
//
// Two L1 clients (instruction and data cache) issue whole-line requests
// (refill reads, and posted write-backs). The crossbar picks one client at a
// time (alternating priority), steers it to the L2 bank selected by the line
// address bits just above the line offset, and moves the line as WORDS
// consecutive word accesses of the bank's K-bit port, collecting the words
// of a read into a line before answering the client.
// The document only names this block; this one-request-at-a-time structure
// is this design's own choice. A line read takes WORDS bank accesses plus one
// cycle to answer; a write is accepted at once and drained in WORDS accesses.
module l2_xbar
  import rr_pkg::*;
#(
  parameter int unsigned NB    = 4,      // L2 banks
  parameter int unsigned K     = 128,    // bank word width
  parameter int unsigned WORDS = LINE_W / K,
  parameter int unsigned BW    = $clog2(NB)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // L1 line ports: [0] instruction cache, [1] data cache
  input  logic [1:0]                    c_req_valid,
  output logic [1:0]                    c_req_ready,
  input  logic [1:0]                    c_req_we,
  input  logic [1:0][PADDR_W-1:0]       c_req_addr,
  input  logic [1:0][LINE_W-1:0]        c_req_wdata,
  output logic [1:0]                    c_resp_valid,
  output logic [LINE_W-1:0]             c_resp_rdata,
  // L2 bank word ports
  output logic [NB-1:0]                 b_req_valid,
  input  logic [NB-1:0]                 b_req_ready,
  output logic                          b_req_we,
  output logic [PADDR_W-1:0]            b_req_addr,
  output logic [K-1:0]                  b_req_wdata,
  input  logic [NB-1:0]                 b_resp_valid,
  input  logic [NB-1:0][K-1:0]          b_resp_rdata
);

  localparam int unsigned WI_W = $clog2(WORDS);
  localparam int unsigned BO_W = $clog2(K / 8);

  typedef enum logic [1:0] {X_IDLE, X_ISSUE, X_WAIT, X_RESP} xstate_e;
  xstate_e state_q;

  logic               cl_q;      // client being served
  logic               prio_q;    // client preferred on a tie
  logic               we_q;
  logic [PADDR_W-1:0] addr_q;
  logic [LINE_W-1:0]  line_q;
  logic [WI_W-1:0]    w_q;
  logic [BW-1:0]      bank;

  assign bank = addr_q[OFFS_W +: BW];

  logic grant_valid, grant;
  always_comb begin
    grant_valid = |c_req_valid;
    grant       = c_req_valid[prio_q] ? prio_q : !prio_q;
  end

  always_comb begin
    c_req_ready  = '0;
    if (state_q == X_IDLE && grant_valid) c_req_ready[grant] = 1'b1;
    c_resp_valid = '0;
    if (state_q == X_RESP) c_resp_valid[cl_q] = 1'b1;
    c_resp_rdata = line_q;
    b_req_valid  = '0;
    if (state_q == X_ISSUE) b_req_valid[bank] = 1'b1;
    b_req_we     = we_q;
    b_req_addr   = {addr_q[PADDR_W-1:OFFS_W], w_q, BO_W'(0)};
    b_req_wdata  = line_q[w_q*K +: K];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= X_IDLE;
      cl_q    <= 1'b0;
      prio_q  <= 1'b0;
      we_q    <= 1'b0;
      addr_q  <= '0;
      line_q  <= '0;
      w_q     <= '0;
    end else begin
      unique case (state_q)
        X_IDLE: if (grant_valid) begin
          cl_q    <= grant;
          prio_q  <= !grant;
          we_q    <= c_req_we[grant];
          addr_q  <= c_req_addr[grant];
          line_q  <= c_req_wdata[grant];
          w_q     <= '0;
          state_q <= X_ISSUE;
        end
        X_ISSUE: if (b_req_ready[bank]) state_q <= X_WAIT;
        X_WAIT: if (b_resp_valid[bank]) begin
          if (!we_q) line_q[w_q*K +: K] <= b_resp_rdata[bank];
          w_q <= w_q + 1'b1;
          if (w_q == WI_W'(WORDS - 1)) state_q <= we_q ? X_IDLE : X_RESP;
          else                         state_q <= X_ISSUE;
        end
        X_RESP: state_q <= X_IDLE;
        default: state_q <= X_IDLE;
      endcase
    end
  end

endmodule
