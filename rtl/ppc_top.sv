// ppc_top: a PPC-protected on-chip link: transmitter, HOPS hops, receiver.
//
// The transmitter encodes N-bit flits with a parity bit per flit and a
// parity flit per group (Parity Product Code), each hop checks every word
// and asks for it again on a parity failure, and the receiver checks, corrects
// single upsets by masking, and asks for rows, columns or the whole group
// again when more went wrong. The mode controller, fed by the receiver's
// checks, switches between adaptive parity flits with a long window (Mode-1),
// plain PPC (Mode-2) and the high-error-rate mode (Mode-3); both ends read
// the same mode and window, which stands for the synchronisation the two
// terminals are assumed to share.
//
// Every hop checks each word's parity on its own (a chain of ppc_hop
// stages, each with its own FIFO and link-level ARQ); the scheme has this
// check at each hop of the path, and its link figure draws one hop, which
// is the default here. The number of hops is this design's parameter.
//
// `link0_flip` and `link1_flip` are XORed onto the TX->first hop and last
// hop->RX wires: they model soft errors on the channel and are tied to zero
// in use. The wires between hops have no injection input.
// The source must be able to replay the last `src_rewind_len` flits when
// `src_rewind` pulses (Mode-1 go-back), and the sink must drop the last
// `snk_rollback_len` flits it received when `snk_rollback` pulses.
// The feedback path from receiver to transmitter is a direct side band.
module ppc_top
  import ppc_pkg::*;
#(
  parameter int unsigned N         = 32,   // data bits per flit
  parameter int unsigned K         = 4,    // flits per group / T-FIFO depth
  parameter int unsigned M_MAX     = 64,   // largest OPC window
  parameter int unsigned HOP_DEPTH = 4,    // hop FIFO entries
  parameter int unsigned RETRIES   = 1,    // link-level retransmissions
  parameter int unsigned HOPS      = 1,    // hops between TX and RX
  localparam int unsigned MW       = $clog2(M_MAX) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // source
  input  logic          src_valid,
  input  logic [N-1:0]  src_data,
  output logic          src_ready,
  output logic          src_rewind,
  output logic [MW-1:0] src_rewind_len,
  // sink
  output logic          snk_valid,
  output logic [N-1:0]  snk_data,
  input  logic          snk_ready,
  output logic          snk_rollback,
  output logic [MW-1:0] snk_rollback_len,
  // channel upsets (test only)
  input  logic [N:0]    link0_flip,
  input  logic [N:0]    link1_flip,
  // link observation
  output logic          link0_valid,
  output logic          link0_accept,
  output flit_kind_e    link0_kind,
  output logic          link1_valid,
  output logic          link1_accept,
  // status
  output ppc_mode_e     mode,
  output logic [MW-1:0] m,
  output logic          high_err,
  output logic          ev_hop_arq,
  output logic          ev_rx_harq,
  output logic          ev_mask,
  output logic          ev_row,
  output logic          ev_col,
  output logic          ev_goback,
  output logic          ev_fpreq,
  output logic          ev_uncorrectable
);
  // lk[0]: TX -> first hop, lk[h]: hop h-1 -> hop h, lk[HOPS]: last hop -> RX
  logic       lk_valid [HOPS+1];
  logic       lk_ready [HOPS+1];
  logic       lk_arq   [HOPS+1];
  flit_kind_e lk_kind  [HOPS+1];
  logic [N:0] lk_data  [HOPS+1];
  logic [HOPS-1:0] hop_arq, hop_pass_bad_unused;
  // feedback
  logic       fb_valid;
  fb_kind_e   fb_kind;
  logic [N:0] fb_arg;
  // mode controller
  logic       eval;
  logic [1:0] cf_sum, cp_sum;

  ppc_tx #(.N(N), .K(K), .M_MAX(M_MAX)) u_tx (
    .clk, .rst_n,
    .src_valid, .src_data, .src_ready, .src_rewind, .src_rewind_len,
    .mode, .m,
    .fb_valid, .fb_kind, .fb_arg,
    .out_valid(lk_valid[0]), .out_kind(lk_kind[0]), .out_data(lk_data[0]),
    .out_ready(lk_ready[0]), .out_arq(lk_arq[0])
  );

  for (genvar h = 0; h < HOPS; h++) begin : g_hop
    ppc_hop #(.N(N), .DEPTH(HOP_DEPTH), .RETRIES(RETRIES)) u_hop (
      .clk, .rst_n,
      .in_valid(lk_valid[h]), .in_kind(lk_kind[h]),
      .in_data((h == 0) ? (lk_data[h] ^ link0_flip) : lk_data[h]),
      .in_ready(lk_ready[h]), .in_arq(lk_arq[h]),
      .out_valid(lk_valid[h+1]), .out_kind(lk_kind[h+1]), .out_data(lk_data[h+1]),
      .out_ready(lk_ready[h+1]), .out_arq(lk_arq[h+1]),
      .arq_event(hop_arq[h]), .pass_bad(hop_pass_bad_unused[h])
    );
  end
  assign ev_hop_arq = |hop_arq;

  ppc_rx #(.N(N), .K(K), .M_MAX(M_MAX), .RETRIES(RETRIES)) u_rx (
    .clk, .rst_n,
    .in_valid(lk_valid[HOPS]), .in_kind(lk_kind[HOPS]),
    .in_data(lk_data[HOPS] ^ link1_flip),
    .in_ready(lk_ready[HOPS]), .in_arq(lk_arq[HOPS]),
    .snk_valid, .snk_data, .snk_ready, .snk_rollback, .snk_rollback_len,
    .fb_valid, .fb_kind, .fb_arg,
    .mode, .m, .eval, .cf_sum, .cp_sum,
    .ev_harq(ev_rx_harq), .ev_mask, .ev_row, .ev_col, .ev_goback, .ev_fpreq,
    .ev_uncorrectable
  );

  ppc_mode_ctrl #(.K(K), .M_MAX(M_MAX)) u_mode (
    .clk, .rst_n, .eval, .cf_sum, .cp_sum, .mode, .m, .high_err
  );

  assign link0_valid  = lk_valid[0];
  assign link0_accept = lk_valid[0] && lk_ready[0] && !lk_arq[0];
  assign link0_kind   = lk_kind[0];
  assign link1_valid  = lk_valid[HOPS];
  assign link1_accept = lk_valid[HOPS] && lk_ready[HOPS] && !lk_arq[HOPS];
endmodule
