// tb_l2_xbar: the instruction-cache and data-cache clients issue random
// line reads and writes through the crossbar to four behavioural L2 banks
// (128-bit word memories with random ready and latency). Checks that each
// word of a write reaches the bank picked by the address, that a read
// returns the whole line to the right client, that a read costs WORDS bank
// accesses, and that both clients are served.
module tb_l2_xbar;
  import rr_pkg::*;
  localparam int unsigned NB = 4, K = 128, WORDS = 4;
  logic clk = 0, rst_n = 0;
  logic [1:0] cv, cr, cw, cresp;
  logic [1:0][PADDR_W-1:0] ca;
  logic [1:0][LINE_W-1:0] cd;
  logic [LINE_W-1:0] crd;
  logic [NB-1:0] bv, br, bresp;
  logic bw;
  logic [PADDR_W-1:0] ba;
  logic [K-1:0] bd;
  logic [NB-1:0][K-1:0] brd;
  int checks = 0, failures = 0;
  logic [K-1:0] mem [NB][logic [PADDR_W-1:0]];
  int bank_acc = 0;
  int done_cnt [2];

  l2_xbar #(.NB(NB), .K(K)) dut (.clk, .rst_n,
    .c_req_valid(cv), .c_req_ready(cr), .c_req_we(cw), .c_req_addr(ca), .c_req_wdata(cd),
    .c_resp_valid(cresp), .c_resp_rdata(crd),
    .b_req_valid(bv), .b_req_ready(br), .b_req_we(bw), .b_req_addr(ba), .b_req_wdata(bd),
    .b_resp_valid(bresp), .b_resp_rdata(brd));
  always #5 clk = ~clk;

  function automatic logic [K-1:0] pat(logic [PADDR_W-1:0] a);
    return {4{a ^ 32'h5bd1e995}};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bank models: accept when ready, answer one cycle later
  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic busy = 0;
    always @(posedge clk) begin
      bresp[b] <= 1'b0;
      br[b]    <= !busy && 1'($urandom_range(2) != 0);
      if (busy) begin
        busy <= 1'b0;
      end else if (bv[b] && br[b]) begin
        bank_acc++;
        checks++;
        if (int'(ba[7:6]) != b) failures++;      // steered to the right bank
        if (bw) mem[b][ba] = bd;
        brd[b]   <= mem[b].exists(ba) ? mem[b][ba] : pat(ba);
        bresp[b] <= 1'b1;
        busy     <= 1'b1;
        br[b]    <= 1'b0;
      end
    end
  end

  function automatic logic [LINE_W-1:0] line_of(logic [PADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < WORDS; w++) begin
      logic [PADDR_W-1:0] wa = a | PADDR_W'(w * 16);
      l[w*K +: K] = mem[int'(a[7:6])].exists(wa) ? mem[int'(a[7:6])][wa] : pat(wa);
    end
    return l;
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_cli
    initial begin
      cv[c] = 0; cw[c] = 0; ca[c] = '0; cd[c] = '0;
      wait (rst_n);
      for (int n = 0; n < 30; n++) begin
        logic [PADDR_W-1:0] a;
        int acc0;
        @(negedge clk);
        a = {22'($urandom_range(7)), 1'(c), 3'($urandom_range(3)), 6'b0};
        cv[c] = 1; cw[c] = 1'($urandom); ca[c] = a;
        cd[c] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                 $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        do @(posedge clk); while (!cr[c]);
        #1;
        cv[c] = 0;
        if (cw[c]) begin
          repeat (40) @(negedge clk);
          checks++;
          if (line_of(a) !== cd[c]) begin
            failures++;
            $display("FAIL client %0d write %h", c, a);
          end
        end else begin
          do @(posedge clk); while (!cresp[c]);
          checks++;
          if (crd !== line_of(a)) begin
            failures++;
            $display("FAIL client %0d read %h", c, a);
          end
        end
        done_cnt[c]++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_cnt[0] == 30 && done_cnt[1] == 30);
    // every line moved = WORDS bank accesses
    checks++;
    if (bank_acc != 60 * WORDS) begin
      failures++;
      $display("FAIL %0d bank accesses", bank_acc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
