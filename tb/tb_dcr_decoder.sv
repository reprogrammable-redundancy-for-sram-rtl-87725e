// tb_dcr_decoder: checks the DCR read shifter. For every redundancy address
// the testbench builds the stored columns itself (data with a garbage bit
// inserted at the failing column) and expects the decoder to return the
// original data, whatever the failing column holds.
module tb_dcr_decoder;
  localparam int unsigned N = 137;
  localparam int unsigned RA_W = $clog2(N + 2);
  logic [N:0] x;
  logic [RA_W-1:0] ra;
  logic [N-1:0] d, dref;
  int checks = 0, failures = 0;

  dcr_decoder #(.N(N)) dut (.x, .ra, .d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= N + 1; k++) begin
      for (int t = 0; t < 8; t++) begin
        for (int i = 0; i < N; i++) dref[i] = 1'($urandom);
        // stored image
        for (int i = 0; i <= N; i++) begin
          if (k == 0) x[i] = (i < N) ? dref[i] : 1'($urandom);
          else if (i < k - 1) x[i] = dref[i];
          else if (i == k - 1) x[i] = 1'($urandom);   // failing cell
          else x[i] = dref[i-1];
        end
        ra = RA_W'(k);
        #1;
        checks++;
        if (d !== dref) begin
          failures++;
          if (failures < 5) $display("FAIL ra=%0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
