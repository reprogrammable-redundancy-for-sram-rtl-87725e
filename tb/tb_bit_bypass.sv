// tb_bit_bypass: a faulty SRAM model behind a bit-bypass array. Failing
// cells (stuck at the wrong value) are repaired by programming BB entries;
// random writes and reads of every row must then return the written data,
// one cycle after the read like the bare macro. A cleared entry must let
// the fault show again.
module tb_bit_bypass;
  localparam int unsigned DEPTH = 32, WIDTH = 40, ENTRIES = 4;
  logic clk = 0, rst_n = 0;
  logic en = 0, we = 0;
  logic [4:0] addr = '0;
  logic [WIDTH-1:0] din = '0, raw, dout;
  logic cfg_valid = 0, cfg_col = 0, cfg_slot = 0, cfg_flag = 0;
  logic [1:0] cfg_idx = '0;
  logic [4:0] cfg_row = '0;
  logic [5:0] cfg_colv = '0;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  sram_macro #(.DEPTH(DEPTH), .WIDTH(WIDTH)) mem (.clk, .en, .we, .addr, .din, .dout(raw));
  bit_bypass #(.DEPTH(DEPTH), .WIDTH(WIDTH), .ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .en, .we, .addr, .din, .sram_dout(raw), .dout,
    .cfg_valid, .cfg_col, .cfg_idx, .cfg_slot, .cfg_flag, .cfg_row, .cfg_colv);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prog(int idx, bit col, bit slot, bit flag, int row, int c);
    @(negedge clk);
    cfg_valid = 1; cfg_idx = 2'(idx); cfg_col = col; cfg_slot = slot; cfg_flag = flag;
    cfg_row = 5'(row); cfg_colv = 6'(c);
    @(negedge clk); cfg_valid = 0;
  endtask

  task automatic wr(int a, logic [WIDTH-1:0] v);
    @(negedge clk); en = 1; we = 1; addr = 5'(a); din = v;
    @(negedge clk); en = 0; we = 0;
  endtask

  task automatic rd(int a, logic [WIDTH-1:0] exp);
    @(negedge clk); en = 1; we = 0; addr = 5'(a);
    @(negedge clk); en = 0;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL row %0d got %h exp %h", a, dout, exp);
    end
  endtask

  initial begin
    mem.inject_fault(3, 5, 1'b1);
    mem.inject_fault(3, 20, 1'b0);
    mem.inject_fault(7, 0, 1'b1);
    mem.inject_fault(30, 39, 1'b0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    prog(0, 0, 0, 1, 3, 0);
    prog(0, 1, 0, 1, 0, 5);
    prog(0, 1, 1, 1, 0, 20);
    prog(1, 0, 0, 1, 7, 0);
    prog(1, 1, 0, 1, 0, 0);
    prog(3, 0, 0, 1, 30, 0);
    prog(3, 1, 1, 1, 0, 39);
    for (int pass = 0; pass < 4; pass++) begin
      for (int a = 0; a < DEPTH; a++) begin
        shadow[a] = {$urandom, $urandom};
        if (pass == 0) begin
          // make the stuck cells differ from what is written
          if (a == 3) begin shadow[a][5] = 0; shadow[a][20] = 1; end
          if (a == 7) shadow[a][0] = 0;
          if (a == 30) shadow[a][39] = 1;
        end
        wr(a, shadow[a]);
      end
      for (int a = DEPTH - 1; a >= 0; a--) rd(a, shadow[a]);
    end
    // raw macro really fails in row 3
    wr(3, '0);
    rd(3, '0);
    checks++;
    if (raw[5] !== 1'b1) failures++;
    // clear entry 1: the stuck-at-1 cell at (7,0) shows again
    prog(1, 0, 0, 0, 7, 0);
    wr(7, '0);
    rd(7, 40'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
