// tb_ppc_coding_rate: measures the coding rate of the whole link, at its
// default size, under three bit error rates (1e-3, 1e-4, 1e-5), the rates
// at which the adaptive parity flit and the overflowing packet check are
// usually compared with plain parity, Hamming and SECDED.
//
// Every bit of every word the transmitter offers flips with probability BER;
// half of the upsets are transient (the first attempt only, repaired by the
// hop's ARQ), half persistent (as if stored in a buffer, left to PPC). The
// coding rate is useful data bits delivered divided by all bits put on the
// first wire, retransmissions included. For each rate the test checks that
// every flit not reported uncorrectable is delivered right, that the rate
// does not exceed plain parity's N/(N+1), and that it falls as BER rises;
// at 1e-5 the adaptive scheme must beat static PPC with 4-flit groups,
// N*K / ((N+1)*(K+1)), clearly. The measured rates are printed.
module tb_ppc_coding_rate;
  import ppc_pkg::*;

  localparam int unsigned N = 32, K = 4, MW = 7;
  localparam int unsigned FLITS = 12000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          src_valid, src_ready, src_rewind;
  logic [N-1:0]  src_data;
  logic [MW-1:0] src_rewind_len, snk_rollback_len, m;
  logic          snk_valid, snk_ready, snk_rollback;
  logic [N-1:0]  snk_data;
  logic [N:0]    flip0, flip1;
  logic          l0_valid, l0_accept, l1_valid, l1_accept;
  flit_kind_e    l0_kind;
  ppc_mode_e     mode;
  logic          high_err, ev_hop_arq, ev_rx_harq, ev_mask, ev_row, ev_col;
  logic          ev_goback, ev_fpreq, ev_uncorrectable;

  ppc_top dut (
    .clk, .rst_n,
    .src_valid, .src_data, .src_ready, .src_rewind, .src_rewind_len,
    .snk_valid, .snk_data, .snk_ready, .snk_rollback, .snk_rollback_len,
    .link0_flip(flip0), .link1_flip(flip1),
    .link0_valid(l0_valid), .link0_accept(l0_accept), .link0_kind(l0_kind),
    .link1_valid(l1_valid), .link1_accept(l1_accept),
    .mode, .m, .high_err, .ev_hop_arq, .ev_rx_harq, .ev_mask, .ev_row, .ev_col,
    .ev_goback, .ev_fpreq, .ev_uncorrectable
  );

  function automatic logic [N-1:0] gen(input int unsigned i);
    return N'(i * 32'h7FEB352D) ^ N'(32'h1234_5678 + 3 * i);
  endfunction

  int unsigned checks = 0, failures = 0;
  int unsigned sp, rp, excuse;
  int unsigned words, delivered, upsets;
  int unsigned ber_ppm;                   // bit error rate in 1e-7 units
  bit          bad [FLITS];
  bit          running;

  assign flip1     = '0;
  assign snk_ready = 1'b1;
  assign src_valid = running && (sp < FLITS);
  assign src_data  = gen(sp);

  always @(posedge clk) if (rst_n && running) begin
    if (src_rewind) sp <= sp - int'(src_rewind_len) + ((src_valid && src_ready) ? 1 : 0);
    else if (src_valid && src_ready) sp <= sp + 1;
    if (snk_valid && snk_ready) begin
      if (rp < FLITS) bad[rp] <= (snk_data != gen(rp)) && (excuse == 0);
      if (excuse != 0) excuse <= excuse - 1;
      rp <= rp + 1;
      delivered <= delivered + 1;
    end
    if (snk_rollback) begin
      rp <= rp - int'(snk_rollback_len);
      delivered <= delivered - int'(snk_rollback_len) + ((snk_valid && snk_ready) ? 1 : 0);
    end
    if (ev_uncorrectable) excuse <= K;
    // every attempt on the first wire costs N+1 bits
    if (l0_accept || ev_hop_arq) words <= words + 1;
  end

  // upsets: each bit with probability ber, half of them persistent
  logic [N:0] pflip;
  bit         fresh;
  always @(posedge clk) begin
    if (!rst_n || !running) begin
      flip0 <= '0; pflip <= '0; fresh <= 1'b1;
    end else begin
      if (!l0_valid || l0_accept) begin
        logic [N:0] t, p;
        t = '0; p = '0;
        for (int b = 0; b <= N; b++)
          if ($urandom_range(0, 9_999_999) < ber_ppm) begin
            if ($urandom_range(0, 1) == 0) t[b] = 1'b1; else p[b] = 1'b1;
            upsets++;
          end
        pflip <= p;
        flip0 <= t | p;
      end else begin
        flip0 <= pflip;        // transient part gone after the first attempt
      end
    end
  end

  real rate [3];
  real parity_rate, ppc_rate;

  initial begin
    int unsigned bers [3];
    bers[0] = 10000; bers[1] = 1000; bers[2] = 100;   // 1e-3, 1e-4, 1e-5
    parity_rate = real'(N) / real'(N + 1);
    ppc_rate    = real'(N * K) / real'((N + 1) * (K + 1));
    running = 1'b0;
    for (int r = 0; r < 3; r++) begin
      ber_ppm = bers[r];
      sp = 0; rp = 0; excuse = 0; words = 0; delivered = 0; upsets = 0;
      for (int i = 0; i < FLITS; i++) bad[i] = 1'b0;
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1; running = 1'b1;
      while (rp < FLITS) @(posedge clk);
      running = 1'b0;
      rate[r] = real'(delivered * N) / real'(words * (N + 1));
      $display("BER %0.0e: %0d flits, %0d upsets, %0d words on the wire, coding rate %0.4f",
               real'(ber_ppm) * 1.0e-7, delivered, upsets, words, rate[r]);
      for (int i = 0; i < FLITS; i++) begin
        checks++;
        if (bad[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: flit %0d wrong at BER index %0d", i, r);
        end
      end
      checks++;
      if (rate[r] > parity_rate + 1.0e-9) begin
        failures++;
        $display("FAIL: rate %0.4f above parity %0.4f", rate[r], parity_rate);
      end
    end
    $display("plain parity %0.4f, static PPC (K=%0d) %0.4f", parity_rate, K, ppc_rate);
    checks++;
    if (!(rate[0] <= rate[1] && rate[1] <= rate[2])) begin
      failures++;
      $display("FAIL: rate does not fall with BER");
    end
    checks++;
    if (rate[2] < ppc_rate + 0.1) begin
      failures++;
      $display("FAIL: adaptive rate %0.4f not clearly above static PPC %0.4f", rate[2], ppc_rate);
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
