// tb_bist_ctrl: runs the March C- sequencer on a 16-row array and compares
// every issued operation with a reference list built by the testbench
// (10n operations), with random stall cycles. Checks the length of a run
// without stalls (10n cycles, one operation per cycle) and the alternating
// data background.
module tb_bist_ctrl;
  import rr_pkg::*;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0, start = 0, alt = 0, stall = 0;
  logic [7:0] test = 8'h5a;
  bist_op_t op;
  logic busy, done;
  int checks = 0, failures = 0;

  typedef struct { bit we; bit d; int a; } ref_op_t;
  ref_op_t refq [$];

  bist_ctrl #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .start, .test, .alt, .stall, .op, .busy, .done);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void build(bit a);
    refq.delete();
    for (int i = 0; i < DEPTH; i++) refq.push_back('{1, 0 ^ (a & i[0]), i});
    for (int i = 0; i < DEPTH; i++) begin
      refq.push_back('{0, 0 ^ (a & i[0]), i}); refq.push_back('{1, 1 ^ (a & i[0]), i}); end
    for (int i = 0; i < DEPTH; i++) begin
      refq.push_back('{0, 1 ^ (a & i[0]), i}); refq.push_back('{1, 0 ^ (a & i[0]), i}); end
    for (int i = DEPTH - 1; i >= 0; i--) begin
      refq.push_back('{0, 0 ^ (a & i[0]), i}); refq.push_back('{1, 1 ^ (a & i[0]), i}); end
    for (int i = DEPTH - 1; i >= 0; i--) begin
      refq.push_back('{0, 1 ^ (a & i[0]), i}); refq.push_back('{1, 0 ^ (a & i[0]), i}); end
    for (int i = 0; i < DEPTH; i++) refq.push_back('{0, 0 ^ (a & i[0]), i});
  endfunction

  task automatic run(bit a, bit with_stall);
    int cycles = 0;
    build(a);
    checks++;
    if (refq.size() != 10 * DEPTH) failures++;
    @(negedge clk); alt = a; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      stall = with_stall ? 1'($urandom_range(3) == 0) : 1'b0;
      #1;
      if (op.en) begin
        ref_op_t r;
        checks++;
        if (refq.size() == 0) failures++;
        else begin
          r = refq.pop_front();
          if (op.we !== r.we || op.dbit !== r.d || int'(op.addr) != r.a || op.test !== 8'h5a) begin
            failures++;
            if (failures < 5) $display("FAIL op we=%0d d=%0d a=%0d exp %0d %0d %0d", op.we, op.dbit, op.addr, r.we, r.d, r.a);
          end
        end
      end
      @(negedge clk);
      cycles++;
    end
    stall = 0;
    checks++;
    if (refq.size() != 0) failures++;
    if (!with_stall) begin
      checks++;
      if (cycles != 10 * DEPTH) begin
        failures++;
        $display("FAIL run took %0d cycles", cycles);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0);
    run(1, 0);
    run(0, 1);
    run(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
