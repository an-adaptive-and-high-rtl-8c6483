// tb_ppc_mask: checks the single-bit masking against the located upset of
// the PPC pattern: a group is encoded in software, one bit of one flit is
// flipped, C_F and C_P are computed in software, and reading the group
// through the mask must give the original data back. Flits that are not
// flagged, or reads with the mask disabled, must pass unchanged.
module tb_ppc_mask;
  localparam int unsigned N = 32, K = 4;
  logic         en, flit_flagged, corrected;
  logic [N:0]   flit, c_p;
  logic [N-1:0] dout;
  int unsigned  checks = 0, failures = 0;

  ppc_mask dut (.en, .flit_flagged, .flit, .c_p, .dout, .corrected);

  initial begin
    logic [K-1:0][N:0] grp, rx;
    logic [N:0]        fp, cp;
    logic [K-1:0]      cf;
    for (int t = 0; t < 300; t++) begin
      int unsigned fk, fb;
      fp = '0;
      for (int k = 0; k < K; k++) begin
        grp[k][N-1:0] = N'({$urandom, $urandom});
        grp[k][N]     = ^grp[k][N-1:0];
        fp ^= grp[k];
      end
      rx = grp;
      fk = $urandom_range(0, K - 1);
      fb = $urandom_range(0, N);
      rx[fk][fb] = ~rx[fk][fb];
      cp = fp;
      for (int k = 0; k < K; k++) begin
        cp ^= rx[k];
        cf[k] = ^rx[k];
      end
      for (int k = 0; k < K; k++) begin
        en = 1'b1; flit_flagged = cf[k]; flit = rx[k]; c_p = cp; #1;
        checks++;
        if (dout !== grp[k][N-1:0] || corrected !== (k == fk)) begin
          failures++;
          $display("FAIL: flit %0d bit %0d/%0d got %h exp %h", k, fk, fb, dout, grp[k][N-1:0]);
        end
        en = 1'b0; #1;
        checks++;
        if (dout !== rx[k][N-1:0] || corrected) begin
          failures++;
          $display("FAIL: disabled mask changed flit %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
