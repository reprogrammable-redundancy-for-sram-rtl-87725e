// memio_arb: shares the single off-chip memory port (MEMIO) among the L2
// banks.
//
// Each bank issues line requests (reads, and posted writes). The arbiter
// grants one requester per cycle in rotating order; after a granted read it
// holds the port until the line comes back and routes the response to that
// bank, so exactly one read is outstanding. The document only names MEMIO;
// the arbitration is this design's own.
module memio_arb
  import rr_pkg::*;
#(
  parameter int unsigned NB = 4,
  parameter int unsigned BW = $clog2(NB)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NB-1:0]            b_req_valid,
  output logic [NB-1:0]            b_req_ready,
  input  logic [NB-1:0]            b_req_we,
  input  logic [NB-1:0][PADDR_W-1:0] b_req_addr,
  input  logic [NB-1:0][LINE_W-1:0]  b_req_wdata,
  output logic [NB-1:0]            b_resp_valid,
  output logic [LINE_W-1:0]        b_resp_rdata,
  // MEMIO
  output logic                     m_req_valid,
  input  logic                     m_req_ready,
  output logic                     m_req_we,
  output logic [PADDR_W-1:0]       m_req_addr,
  output logic [LINE_W-1:0]        m_req_wdata,
  input  logic                     m_resp_valid,
  input  logic [LINE_W-1:0]        m_resp_rdata
);

  logic [BW-1:0] ptr_q, owner_q, sel;
  logic          busy_q, found;

  always_comb begin
    found = 1'b0;
    sel   = ptr_q;
    for (int k = 0; k < NB; k++) begin
      logic [BW-1:0] b;
      b = BW'(ptr_q + BW'(k));
      if (!found && b_req_valid[b]) begin
        found = 1'b1;
        sel   = b;
      end
    end
    m_req_valid = found && !busy_q;
    m_req_we    = b_req_we[sel];
    m_req_addr  = b_req_addr[sel];
    m_req_wdata = b_req_wdata[sel];
    b_req_ready = '0;
    if (!busy_q && found) b_req_ready[sel] = m_req_ready;
    b_resp_valid = '0;
    if (busy_q) b_resp_valid[owner_q] = m_resp_valid;
    b_resp_rdata = m_resp_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q   <= '0;
      owner_q <= '0;
      busy_q  <= 1'b0;
    end else begin
      if (m_req_valid && m_req_ready) begin
        ptr_q <= sel + 1'b1;
        if (!m_req_we) begin
          busy_q  <= 1'b1;
          owner_q <= sel;
        end
      end
      if (busy_q && m_resp_valid) busy_q <= 1'b0;
    end
  end

endmodule
