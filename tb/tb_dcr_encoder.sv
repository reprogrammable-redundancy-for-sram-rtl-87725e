// tb_dcr_encoder: checks the DCR write shifter at the L2 word width
// (137 protected bits) for every redundancy address. Expected columns:
// RA = 0 -> {0, d}; RA = k -> columns below k-1 hold d[i], columns above
// hold d[i-1]; the failing column itself is not checked.
module tb_dcr_encoder;
  localparam int unsigned N = 137;
  localparam int unsigned RA_W = $clog2(N + 2);
  logic [N-1:0] d;
  logic [RA_W-1:0] ra;
  logic [N:0] x;
  int checks = 0, failures = 0;

  dcr_encoder #(.N(N)) dut (.d, .ra, .x);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= N + 1; k++) begin
      for (int t = 0; t < 8; t++) begin
        for (int i = 0; i < N; i++) d[i] = 1'($urandom);
        ra = RA_W'(k);
        #1;
        for (int i = 0; i <= N; i++) begin
          logic e;
          bit skip;
          skip = 0;
          if (k == 0) e = (i < N) ? d[i] : 1'b0;
          else if (i < k - 1) e = d[i];
          else if (i == k - 1) skip = 1;
          else e = d[i-1];
          if (!skip) begin
            checks++;
            if (x[i] !== e) begin
              failures++;
              if (failures < 5) $display("FAIL ra=%0d col=%0d", k, i);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
