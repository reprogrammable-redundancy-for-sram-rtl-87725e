// tb_bist_checker: feeds the checker read operations and macro outputs,
// some of them wrong, and checks that exactly the mismatches are logged as
// {row, dout, test} in order, that rows beyond the macro are ignored, that
// almost_full rises at FIFO-2 entries and that a lost entry sets overflow.
module tb_bist_checker;
  import rr_pkg::*;
  localparam int unsigned WIDTH = 24, DEPTH = 32;
  logic clk = 0, rst_n = 0, pop = 0;
  bist_op_t op;
  logic [WIDTH-1:0] dout;
  logic ev;
  logic [15:0] ea;
  logic [WIDTH-1:0] ed;
  logic [7:0] et;
  logic af, ovf;
  int checks = 0, failures = 0;

  bist_checker #(.WIDTH(WIDTH), .DEPTH(DEPTH), .FIFO(4)) dut (
    .clk, .rst_n, .op, .dout, .err_valid(ev), .err_addr(ea), .err_dout(ed), .err_test(et),
    .err_pop(pop), .almost_full(af), .overflow(ovf));
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one read of row a expecting bit e; the macro answers v next cycle
  task automatic rd(int a, bit e, logic [WIDTH-1:0] v);
    @(negedge clk);
    op = '0; op.en = 1; op.we = 0; op.addr = 16'(a); op.dbit = e; op.test = 8'(a + 1);
    @(negedge clk);
    op = '0;
    dout = v;
  endtask

  task automatic expect_entry(int a, logic [WIDTH-1:0] v);
    checks++;
    if (!ev || ea !== 16'(a) || ed !== v || et !== 8'(a + 1)) begin
      failures++;
      $display("FAIL entry %0d/%h/%0d exp %0d/%h", ea, ed, et, a, v);
    end
    @(negedge clk); pop = 1;
    @(negedge clk); pop = 0;
  endtask

  initial begin
    op = '0; dout = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(1, 0, '0);            // good
    rd(2, 1, '1);            // good
    rd(3, 0, 24'h000100);    // bad
    rd(4, 1, 24'hfffff7);    // bad
    rd(40, 0, 24'h1);        // row beyond the macro: ignored
    @(negedge clk);
    checks++;
    if (!af || ovf) failures++;
    expect_entry(3, 24'h000100);
    expect_entry(4, 24'hfffff7);
    checks++;
    if (ev || af) failures++;
    for (int i = 0; i < 5; i++) rd(10 + i, 0, 24'h800000);
    @(negedge clk);
    checks++;
    if (!ovf) failures++;
    for (int i = 0; i < 4; i++) expect_entry(10 + i, 24'h800000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
