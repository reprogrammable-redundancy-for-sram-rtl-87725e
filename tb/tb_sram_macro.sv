// tb_sram_macro: checks the SRAM model: registered read one cycle after the
// access, write/read of random data against a shadow copy, and stuck-at
// behaviour of injected failing cells.
module tb_sram_macro;
  localparam int unsigned DEPTH = 64, WIDTH = 40;
  logic clk = 0, en = 0, we = 0;
  logic [5:0] addr;
  logic [WIDTH-1:0] din, dout;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  sram_macro #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [WIDTH-1:0] v);
    @(negedge clk); en = 1; we = 1; addr = 6'(a); din = v;
    @(negedge clk); en = 0; we = 0;
  endtask

  task automatic rd_check(int a, logic [WIDTH-1:0] exp);
    @(negedge clk); en = 1; we = 0; addr = 6'(a);
    @(negedge clk); en = 0;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL row %0d got %h exp %h", a, dout, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      shadow[a] = {$urandom, $urandom};
      wr(a, shadow[a]);
    end
    for (int a = 0; a < DEPTH; a++) rd_check(a, shadow[a]);
    dut.inject_fault(5, 3, 1'b1);
    dut.inject_fault(9, 39, 1'b0);
    wr(5, '0);
    rd_check(5, 40'h8);
    wr(9, '1);
    rd_check(9, {1'b0, 39'h7fffffffff});
    dut.clear_faults();
    wr(5, '0);
    rd_check(5, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
