// tb_secded_dec: encodes random words, flips zero, one or two random bits,
// and checks the decoder's flags and its output with correction on and off.
module tb_secded_dec;
  localparam int unsigned K = 128;
  localparam int unsigned W = 137;
  logic [K-1:0] d, dout;
  logic [W-1:0] cw, cwe;
  logic corr_en, se, de;
  int checks = 0, failures = 0;

  secded_enc #(.K(K)) enc (.d(d), .cw(cw));
  secded_dec #(.K(K)) dut (.cw(cwe), .corr_en, .d(dout), .single_err(se), .double_err(de));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int nflip;
      int b0, b1;
      nflip = t % 3;
      d = {$urandom, $urandom, $urandom, $urandom};
      corr_en = 1'($urandom);
      #1;
      cwe = cw;
      b0 = $urandom_range(W - 1);
      do b1 = $urandom_range(W - 1); while (b1 == b0);
      if (nflip >= 1) cwe[b0] = ~cwe[b0];
      if (nflip == 2) cwe[b1] = ~cwe[b1];
      #1;
      checks += 3;
      if (se !== (nflip == 1)) failures++;
      if (de !== (nflip == 2)) failures++;
      if (nflip == 0 || (nflip == 1 && corr_en)) begin
        if (dout !== d) failures++;
      end else if (nflip == 1) begin
        if (dout !== cwe[K-1:0]) failures++;   // logged, not corrected
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
