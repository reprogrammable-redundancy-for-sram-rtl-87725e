// tb_secded: checks the SEC-DED encoder for 128- and 64-bit words against a
// reference built another way: the Hamming check bits equal the XOR of the
// positions of all set data bits, and the top bit makes the word's parity
// even. Also checks the check-bit counts (9 and 8).
module tb_secded;
  logic [127:0] d128;
  logic [136:0] cw128;
  logic [63:0]  d64;
  logic [71:0]  cw64;
  int checks = 0, failures = 0;

  secded_enc #(.K(128)) dut128 (.d(d128), .cw(cw128));
  secded_enc #(.K(64))  dut64  (.d(d64),  .cw(cw64));

  function automatic int unsigned pos_of(int unsigned i);
    int unsigned p = 3, n = 0;
    forever begin
      if ((p & (p - 1)) != 0) begin
        if (n == i) return p;
        n++;
      end
      p++;
    end
  endfunction

  task automatic check(int unsigned k, logic [127:0] d, logic [136:0] cw, int unsigned r);
    int unsigned acc = 0;
    for (int unsigned i = 0; i < k; i++) if (d[i]) acc ^= pos_of(i);
    checks++;
    for (int unsigned i = 0; i < k; i++) if (cw[i] !== d[i]) failures++;
    for (int unsigned j = 0; j < r; j++) begin
      checks++;
      if (cw[k+j] !== 1'((acc >> j) & 1)) failures++;
    end
    checks++;
    begin
      logic p = 1'b0;
      for (int unsigned b = 0; b <= k + r; b++) p ^= cw[b];
      if (p !== 1'b0) failures++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut128.C != 9 || dut64.C != 8) failures++;
    for (int t = 0; t < 300; t++) begin
      d128 = {$urandom, $urandom, $urandom, $urandom};
      d64  = {$urandom, $urandom};
      if (t < 128) begin d128 = 128'(1) << t; d64 = 64'(1) << (t % 64); end
      #1;
      check(128, d128, cw128, 8);
      check(64, {64'b0, d64}, {65'b0, cw64}, 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
