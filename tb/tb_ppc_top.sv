// tb_ppc_top: end-to-end test of the PPC link at its default size
// (N = 32 data bits, groups of K = 4 flits, OPC windows up to 64 flits).
//
// A source sends a known sequence (flit i carries gen(i)) and replays when
// asked to rewind; a sink checks every flit against gen() and forgets flits
// it is told to roll back. Upsets are injected on both channel wires:
// transient flips (the hop or receiver asks again), persistent single flips
// (survive the link ARQ, corrected by PPC masking) and persistent double
// flips in one flit (invisible to the flit parity, found by the packet
// parity: row ARQ in Mode-2, window rewind in Mode-1). The run goes through
// a clean start (Mode-2 -> Mode-1, window growing to 64), a low error rate
// phase, a burst that drives the link into Mode-3, and a clean tail.
// Every mechanism must be seen at least once; every flit delivered outside
// the burst must be right.
module tb_ppc_top;
  import ppc_pkg::*;

  localparam int unsigned N     = 32;
  localparam int unsigned MW    = 7;
  localparam int unsigned TOTAL = 4000;
  localparam int unsigned STORM_LO = 3000, STORM_HI = 3300;

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
    return N'(i * 32'h9E3779B1) ^ N'(32'h5A5A_0F0F + i);
  endfunction

  int unsigned checks = 0, failures = 0;
  int unsigned sp = 0, rp = 0, cycles = 0;
  bit          bad [TOTAL];
  int unsigned excuse = 0;       // deliveries forgiven after an uncorrectable group

  // ------------------------------------------------------------ source
  assign src_valid = (sp < TOTAL);
  assign src_data  = gen(sp);
  always @(posedge clk) if (rst_n) begin
    if (src_rewind) sp <= sp - int'(src_rewind_len) + ((src_valid && src_ready) ? 1 : 0);
    else if (src_valid && src_ready) sp <= sp + 1;
  end

  // ------------------------------------------------------------ sink
  always @(posedge clk) if (rst_n) begin
    if (snk_valid && snk_ready) begin
      if (rp < TOTAL) bad[rp] <= (snk_data != gen(rp)) && (excuse == 0) && !storm_zone;
      if (excuse != 0) excuse <= excuse - 1;
      rp <= rp + 1;
    end
    if (snk_rollback) rp <= rp - int'(snk_rollback_len);
    if (ev_uncorrectable) excuse <= 4;
  end

  // ------------------------------------------------------------ upsets
  bit storm, storm_zone;
  int unsigned storm_tail = 0;
  assign storm = (rp >= STORM_LO) && (rp < STORM_HI);
  always @(posedge clk) begin
    if (storm) storm_tail <= 400;
    else if (storm_tail != 0) storm_tail <= storm_tail - 1;
  end
  assign storm_zone = storm || (storm_tail != 0);

  bit persist0;
  int unsigned r, b0, b1;
  always @(posedge clk) begin
    if (!rst_n) begin
      flip0 <= '0; flip1 <= '0; persist0 <= 1'b0;
    end else begin
      // link 0: choose the upset of the next word, hold it if persistent
      if (!l0_valid || l0_accept) begin
        r  = $urandom_range(0, 999);
        b0 = $urandom_range(0, N);
        b1 = (b0 + 1 + $urandom_range(0, N - 1)) % (N + 1);
        flip0    <= '0;
        persist0 <= 1'b0;
        if (rp >= 600 && rp < STORM_LO) begin
          if (r < 20)      flip0 <= (N+1)'(1) << b0;                       // transient
          else if (r < 30) begin flip0 <= (N+1)'(1) << b0; persist0 <= 1'b1; end
          else if (r < 35) begin flip0 <= ((N+1)'(1) << b0) | ((N+1)'(1) << b1); persist0 <= 1'b1; end
        end else if (storm) begin
          if (r < 300)      begin flip0 <= (N+1)'(1) << b0; persist0 <= 1'b1; end
          else if (r < 600) begin flip0 <= ((N+1)'(1) << b0) | ((N+1)'(1) << b1); persist0 <= 1'b1; end
        end
      end else if (!persist0) begin
        flip0 <= '0;
      end
      // link 1: transient flips only
      r = $urandom_range(0, 999);
      flip1 <= (rp >= 600 && rp < STORM_LO && r < 20) ? (N+1)'(1) << $urandom_range(0, N) : '0;
    end
  end

  // sink back-pressure now and then
  always @(posedge clk) snk_ready <= ($urandom_range(0, 9) != 0);

  // ------------------------------------------------------------ mechanisms seen
  int unsigned n_hop_arq, n_rx_harq, n_mask, n_row, n_col, n_gb2, n_gb1, n_fpreq;
  int unsigned n_rewind, n_rollback, n_uncorr, n_high, n_m1, n_m3, n_mmax, n_m_down;
  ppc_mode_e   mode_d;
  logic        high_d = 1'b0;
  logic [MW-1:0] m_d;
  always @(posedge clk) if (rst_n) begin
    n_hop_arq  += int'(ev_hop_arq);
    n_rx_harq  += int'(ev_rx_harq);
    n_mask     += int'(ev_mask);
    n_row      += int'(ev_row);
    n_col      += int'(ev_col);
    n_gb2      += int'(ev_goback && mode != MODE_1);
    n_gb1      += int'(ev_goback && mode == MODE_1);
    n_fpreq    += int'(ev_fpreq);
    n_rewind   += int'(src_rewind);
    n_rollback += int'(snk_rollback && snk_rollback_len != 0);
    n_uncorr   += int'(ev_uncorrectable);
    n_high     += int'(high_err && !high_d);
    high_d     <= high_err;
    n_m1       += int'(mode == MODE_1 && mode_d == MODE_2);
    n_m3       += int'(mode == MODE_3 && mode_d == MODE_2);
    n_mmax     += int'(m == MW'(64) && m_d != MW'(64));
    n_m_down   += int'(mode == MODE_1 && m < m_d);
    mode_d <= mode;
    m_d    <= m;
  end

  task automatic need(input string what, input int unsigned n);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    n_hop_arq = 0; n_rx_harq = 0; n_mask = 0; n_row = 0; n_col = 0; n_gb2 = 0;
    n_gb1 = 0; n_fpreq = 0; n_rewind = 0; n_rollback = 0; n_uncorr = 0; n_high = 0;
    n_m1 = 0; n_m3 = 0; n_mmax = 0; n_m_down = 0;
    mode_d = MODE_2; m_d = '0;
    for (int i = 0; i < TOTAL; i++) bad[i] = 1'b0;
    void'($urandom(7));
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (rp < TOTAL) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int i = 0; i < TOTAL; i++) begin
      checks++;
      if (bad[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: flit %0d delivered wrong", i);
      end
    end
    $display("mechanisms:");
    need("hop link ARQ", n_hop_arq);
    need("receiver link ARQ (HARQ)", n_rx_harq);
    need("single-bit masking (FEC)", n_mask);
    need("row ARQ", n_row);
    need("column ARQ", n_col);
    need("go-back-N (Mode-2/3)", n_gb2);
    need("window go-back (Mode-1 OPC)", n_gb1);
    need("adaptive F_P request", n_fpreq);
    need("source rewind", n_rewind);
    need("sink rollback", n_rollback);
    need("uncorrectable group", n_uncorr);
    need("high error rate reported", n_high);
    need("Mode-2 -> Mode-1", n_m1);
    need("Mode-2 -> Mode-3", n_m3);
    need("window reached M_MAX", n_mmax);
    need("window halved", n_m_down);
    checks++;
    if (sp != TOTAL) begin
      failures++;
      $display("FAIL: source at %0d", sp);
    end
    $display("cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, source %0d sink %0d", sp, rp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
