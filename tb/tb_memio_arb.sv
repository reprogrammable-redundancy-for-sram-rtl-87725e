// tb_memio_arb: four requesters issue random line reads and writes to one
// memory port. A behavioural memory answers reads after a random delay. The
// testbench checks that every write lands with its data, that every read
// returns the line at that address to the bank that asked, that only one
// read is outstanding, and that every requester is served.
module tb_memio_arb;
  import rr_pkg::*;
  localparam int unsigned NB = 4;
  logic clk = 0, rst_n = 0;
  logic [NB-1:0] bv, br, bw, bresp;
  logic [NB-1:0][PADDR_W-1:0] ba;
  logic [NB-1:0][LINE_W-1:0] bd;
  logic [LINE_W-1:0] brd;
  logic mv, mr, mw, mresp;
  logic [PADDR_W-1:0] ma;
  logic [LINE_W-1:0] md, mrd;
  int checks = 0, failures = 0;
  logic [LINE_W-1:0] mem [logic [PADDR_W-1:0]];
  int served [NB];
  bit waiting [NB];
  logic [PADDR_W-1:0] want [NB];
  int outstanding = 0;

  memio_arb #(.NB(NB)) dut (.clk, .rst_n, .b_req_valid(bv), .b_req_ready(br), .b_req_we(bw),
    .b_req_addr(ba), .b_req_wdata(bd), .b_resp_valid(bresp), .b_resp_rdata(brd),
    .m_req_valid(mv), .m_req_ready(mr), .m_req_we(mw), .m_req_addr(ma), .m_req_wdata(md),
    .m_resp_valid(mresp), .m_resp_rdata(mrd));
  always #5 clk = ~clk;

  function automatic logic [LINE_W-1:0] pat(logic [PADDR_W-1:0] a);
    return {16{a ^ 32'h9e3779b9}};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory side
  logic [PADDR_W-1:0] rd_addr;
  int delay = -1;
  always @(negedge clk) begin
    mresp <= 1'b0;
    if (delay == 0) begin
      mresp <= 1'b1;
      mrd   <= mem.exists(rd_addr) ? mem[rd_addr] : pat(rd_addr);
      outstanding--;
    end
    if (delay >= 0) delay--;
  end
  always @(posedge clk) if (rst_n && mv && mr) begin
    if (mw) mem[ma] = md;
    else begin
      rd_addr = ma;
      delay = $urandom_range(4);
      outstanding++;
      checks++;
      if (outstanding > 1) failures++;
    end
  end
  always @(posedge clk) mr <= 1'($urandom_range(3) != 0);

  // requesters
  for (genvar b = 0; b < NB; b++) begin : g_req
    initial begin
      bv[b] = 0; bw[b] = 0; ba[b] = '0; bd[b] = '0;
      wait (rst_n);
      for (int n = 0; n < 40; n++) begin
        logic [PADDR_W-1:0] a;
        @(negedge clk);
        a = {24'($urandom_range(15)), 2'(b), 6'b0};
        bv[b] = 1; bw[b] = 1'($urandom); ba[b] = a; bd[b] = {16{$urandom}};
        do @(posedge clk); while (!br[b]);
        #1;
        bv[b] = 0;
        if (bw[b]) begin
          // wait until the write has been stored by the memory side
          @(negedge clk);
          checks++;
          if (mem[a] !== bd[b]) failures++;
        end else begin
          do @(posedge clk); while (!bresp[b]);
          checks++;
          if (brd !== (mem.exists(a) ? mem[a] : pat(a))) begin
            failures++;
            $display("FAIL bank %0d read %h", b, a);
          end
        end
        served[b]++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (served[0] == 40 && served[1] == 40 && served[2] == 40 && served[3] == 40);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
