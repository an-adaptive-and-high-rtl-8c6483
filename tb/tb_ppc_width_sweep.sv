// tb_ppc_width_sweep: coding rate of the whole link against data width,
// the sweep usually drawn for link-level codes (flit widths from a few bits
// to a hundred and more, at bit error rates 1e-3, 1e-4 and 1e-5).
//
// Fifteen links run side by side, one per (width, BER) pair, each a
// ppc_rate_harness sending 3000 flits: widths 8, 16, 32, 64 and 120 bits.
// Widths below K+1 = 5 bits cannot carry a row answer and are not swept.
// For every link the test checks that no flit outside a reported
// uncorrectable group arrives wrong and that the rate stays at or below
// plain parity's N/(N+1). For every width it checks that the rate does not
// rise with BER and that at 1e-5 the adaptive scheme lies above static PPC
// with 4-flit groups, N*K/((N+1)*(K+1)). The measured table is printed.
module tb_ppc_width_sweep;
  localparam int unsigned NW = 5, NB = 3, FLITS = 3000, K = 4;
  localparam int unsigned WIDTHS [NW] = '{8, 16, 32, 64, 120};
  localparam int unsigned BERS   [NB] = '{10000, 1000, 100};   // 1e-7 units

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        done [NW][NB];
  int unsigned dlv  [NW][NB];
  int unsigned wrd  [NW][NB];
  int unsigned bad  [NW][NB];

  for (genvar w = 0; w < NW; w++) begin : g_w
    for (genvar b = 0; b < NB; b++) begin : g_b
      ppc_rate_harness #(
        .N(WIDTHS[w]), .BER_E7(BERS[b]), .FLITS(FLITS), .SEED(w * NB + b + 1)
      ) h (
        .clk, .rst_n, .done(done[w][b]), .delivered(dlv[w][b]),
        .words(wrd[w][b]), .wrong(bad[w][b])
      );
    end
  end

  int unsigned checks = 0, failures = 0;

  function automatic bit all_done();
    for (int w = 0; w < NW; w++)
      for (int b = 0; b < NB; b++)
        if (!done[w][b]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    real rate [NB];
    real par, ppc;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    $display("width  parity  static-PPC  BER=1e-3  BER=1e-4  BER=1e-5");
    for (int w = 0; w < NW; w++) begin
      par = real'(WIDTHS[w]) / real'(WIDTHS[w] + 1);
      ppc = real'(WIDTHS[w] * K) / real'((WIDTHS[w] + 1) * (K + 1));
      for (int b = 0; b < NB; b++) begin
        rate[b] = real'(dlv[w][b] * WIDTHS[w]) / real'(wrd[w][b] * (WIDTHS[w] + 1));
        checks++;
        if (bad[w][b] != 0) begin
          failures++;
          $display("FAIL: width %0d BER index %0d: %0d wrong flits", WIDTHS[w], b, bad[w][b]);
        end
        checks++;
        if (rate[b] > par + 1.0e-9) begin
          failures++;
          $display("FAIL: width %0d rate %0.4f above parity %0.4f", WIDTHS[w], rate[b], par);
        end
      end
      $display("%5d  %6.4f  %10.4f  %8.4f  %8.4f  %8.4f",
               WIDTHS[w], par, ppc, rate[0], rate[1], rate[2]);
      checks++;
      if (!(rate[0] <= rate[1] + 0.005 && rate[1] <= rate[2] + 0.005)) begin
        failures++;
        $display("FAIL: width %0d rate rises with BER", WIDTHS[w]);
      end
      checks++;
      if (rate[2] <= ppc) begin
        failures++;
        $display("FAIL: width %0d adaptive %0.4f not above static PPC %0.4f",
                 WIDTHS[w], rate[2], ppc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
