// tb_ppc_multihop: the link with one, two and four hops, every hop checking
// parity and asking for words again on its own.
//
// Three ppc_rate_harness links (N = 32, K = 4) run side by side at BER 1e-3
// on the first wire, half transient and half persistent upsets, 3000 flits
// each. A persistent upset passes the first hop after its retry and is seen
// again by every later hop, so hop ARQs grow with the number of hops. The
// test checks that every flit outside a group reported uncorrectable
// arrives intact on each link, that hop ARQs happened on each, that more
// hops give more hop ARQs. Three more links of the same lengths run with no
// upsets, 100 flits each: on them the first flit's delivery must move later
// by exactly one cycle per extra hop (each hop is one registered FIFO stage).
module tb_ppc_multihop;
  localparam int unsigned NL = 3, FLITS = 3000;
  localparam int unsigned HOPS [NL] = '{1, 2, 4};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        done  [NL];
  int unsigned dlv   [NL];
  int unsigned wrd   [NL];
  int unsigned bad   [NL];
  int unsigned arqs  [NL];
  int unsigned first [NL];

  for (genvar l = 0; l < NL; l++) begin : g_l
    ppc_rate_harness #(
      .N(32), .BER_E7(10000), .FLITS(FLITS), .SEED(7), .HOPS(HOPS[l])
    ) h (
      .clk, .rst_n, .done(done[l]), .delivered(dlv[l]), .words(wrd[l]),
      .wrong(bad[l]), .hop_arqs(arqs[l]), .first_cycle(first[l])
    );
  end

  logic        cdone  [NL];
  int unsigned cdlv   [NL];
  int unsigned cwrd   [NL];
  int unsigned cbad   [NL];
  int unsigned carqs  [NL];
  int unsigned cfirst [NL];

  for (genvar l = 0; l < NL; l++) begin : g_c
    ppc_rate_harness #(
      .N(32), .BER_E7(0), .FLITS(100), .SEED(3), .HOPS(HOPS[l])
    ) h (
      .clk, .rst_n, .done(cdone[l]), .delivered(cdlv[l]), .words(cwrd[l]),
      .wrong(cbad[l]), .hop_arqs(carqs[l]), .first_cycle(cfirst[l])
    );
  end

  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!(done[0] && done[1] && done[2] && cdone[0] && cdone[1] && cdone[2])) @(posedge clk);
    for (int l = 0; l < NL; l++) begin
      $display("%0d hop(s): %0d flits, %0d wrong, %0d hop ARQs; clean: first flit after %0d cycles",
               HOPS[l], dlv[l], bad[l], arqs[l], cfirst[l]);
      checks++;
      if (cbad[l] != 0 || carqs[l] != 0) begin
        failures++;
        $display("FAIL: %0d hop(s), clean: %0d wrong, %0d hop ARQs", HOPS[l], cbad[l], carqs[l]);
      end
      checks++;
      if (bad[l] != 0 || dlv[l] != FLITS) begin
        failures++;
        $display("FAIL: %0d hop(s): %0d wrong, %0d delivered", HOPS[l], bad[l], dlv[l]);
      end
      checks++;
      if (arqs[l] == 0) begin
        failures++;
        $display("FAIL: %0d hop(s): no hop ARQ", HOPS[l]);
      end
      if (l > 0) begin
        checks++;
        if (arqs[l] <= arqs[l-1]) begin
          failures++;
          $display("FAIL: %0d hops gave no more hop ARQs than %0d", HOPS[l], HOPS[l-1]);
        end
        checks++;
        if (cfirst[l] != cfirst[l-1] + (HOPS[l] - HOPS[l-1])) begin
          failures++;
          $display("FAIL: %0d hops deliver the first flit at %0d, %0d hops at %0d",
                   HOPS[l], cfirst[l], HOPS[l-1], cfirst[l-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
