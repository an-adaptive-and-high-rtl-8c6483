// ppc_rate_harness: drives one ppc_top of data width N under a bit error
// rate and counts what it costs. Test-only helper.
//
// A source sends FLITS known flits (replaying on `src_rewind`), a sink checks
// them (forgetting flits on `snk_rollback`; flits of a group reported
// uncorrectable are not counted as wrong). Every bit of every word offered
// on the first wire flips with probability BER_E7 * 1e-7; half of the upsets
// are transient (first attempt only), half persistent. When all flits are
// delivered `done` rises with the number delivered, the number of word
// attempts on the first wire and the number of wrong flits; it also counts
// the hop ARQs and the cycle of the first delivery after reset. The link
// has HOPS hops; upsets are injected on the first wire only.
// The word count includes hop ARQs of every hop, so it measures the first
// wire exactly only for HOPS = 1.
module ppc_rate_harness
  import ppc_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned BER_E7 = 1000,
  parameter int unsigned FLITS  = 3000,
  parameter int unsigned SEED   = 1,
  parameter int unsigned HOPS   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned delivered,
  output int unsigned words,
  output int unsigned wrong,
  output int unsigned hop_arqs,
  output int unsigned first_cycle
);
  localparam int unsigned K = 4, MW = 7;

  logic          src_valid, src_ready, src_rewind;
  logic [N-1:0]  src_data;
  logic [MW-1:0] src_rewind_len, snk_rollback_len, m;
  logic          snk_valid, snk_rollback;
  logic [N-1:0]  snk_data;
  logic [N:0]    flip0, pflip;
  logic          l0_valid, l0_accept, l1_valid, l1_accept;
  flit_kind_e    l0_kind;
  ppc_mode_e     mode;
  logic          high_err, ev_hop_arq, ev_rx_harq, ev_mask, ev_row, ev_col;
  logic          ev_goback, ev_fpreq, ev_uncorrectable;

  ppc_top #(.N(N), .HOPS(HOPS)) dut (
    .clk, .rst_n,
    .src_valid, .src_data, .src_ready, .src_rewind, .src_rewind_len,
    .snk_valid, .snk_data, .snk_ready(1'b1), .snk_rollback, .snk_rollback_len,
    .link0_flip(flip0), .link1_flip('0),
    .link0_valid(l0_valid), .link0_accept(l0_accept), .link0_kind(l0_kind),
    .link1_valid(l1_valid), .link1_accept(l1_accept),
    .mode, .m, .high_err, .ev_hop_arq, .ev_rx_harq, .ev_mask, .ev_row, .ev_col,
    .ev_goback, .ev_fpreq, .ev_uncorrectable
  );

  function automatic logic [N-1:0] gen(input int unsigned i);
    logic [127:0] w;
    for (int j = 0; j < 4; j++) w[32*j +: 32] = (i + 1) * 32'h9E3779B1 ^ (32'h85EBCA6B * (j + SEED));
    return w[N-1:0];
  endfunction

  int unsigned sp, rp, excuse, cyc;
  bit          bad [FLITS];

  assign src_valid = rst_n && (sp < FLITS);
  assign src_data  = gen(sp);
  assign done      = rst_n && (rp >= FLITS);

  always @(posedge clk) begin
    if (!rst_n) begin
      sp <= 0; rp <= 0; excuse <= 0; words <= 0; hop_arqs <= 0; first_cycle <= 0;
      cyc <= 0;
      flip0 <= '0; pflip <= '0;
    end else begin
      if (src_rewind) sp <= sp - int'(src_rewind_len) + ((src_valid && src_ready) ? 1 : 0);
      else if (src_valid && src_ready) sp <= sp + 1;
      if (snk_valid) begin
        if (rp < FLITS) bad[rp] <= (snk_data != gen(rp)) && (excuse == 0);
        if (excuse != 0) excuse <= excuse - 1;
        rp <= rp + 1;
      end
      if (snk_rollback) rp <= rp - int'(snk_rollback_len);
      if (ev_uncorrectable) excuse <= K;
      if (!done && (l0_accept || ev_hop_arq)) words <= words + 1;
      if (ev_hop_arq) hop_arqs <= hop_arqs + 1;
      cyc <= cyc + 1;
      if (snk_valid && first_cycle == 0) first_cycle <= cyc + 1;
      // upsets for the next word, or the persistent part of this one
      if (!l0_valid || l0_accept) begin
        logic [N:0] t, p;
        t = '0; p = '0;
        for (int b = 0; b <= N; b++)
          if ($urandom_range(0, 9_999_999) < BER_E7) begin
            if ($urandom_range(0, 1) == 0) t[b] = 1'b1; else p[b] = 1'b1;
          end
        pflip <= p;
        flip0 <= t | p;
      end else begin
        flip0 <= pflip;
      end
    end
  end

  always_comb begin
    wrong = 0;
    for (int i = 0; i < FLITS; i++) wrong += int'(bad[i]);
    delivered = (rp > FLITS) ? FLITS : rp;
  end

  initial for (int i = 0; i < FLITS; i++) bad[i] = 1'b0;
endmodule
