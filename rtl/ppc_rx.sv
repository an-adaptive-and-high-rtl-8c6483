// ppc_rx: PPC receiver (decoder, T-FIFO, controller and Mask).
//
// Each arriving code word is checked by FLIT PAR. A failing word is refused
// once with `in_arq` (hybrid ARQ on the last link); if it fails again it is
// accepted and its flit stays flagged (C_F = 1). Accepted data flits are
// written into a K-entry transposable FIFO and folded into PACK. PAR; when
// F_P arrives it is folded in too, so the register then holds C_P.
//
// Decision for a group of K flits (C_F flags from the FIFO, C_P register):
//   Mode-2/3 (F_P after every group)
//     no flag, C_P = 0          deliver
//     one flag, one C_P bit     deliver, Mask flips the located bit (FEC)
//     no flag, C_P != 0         row ARQ: ask for the bit indexes in C_P and
//                               write the answers across the FIFO (once)
//     flags                     column ARQ for the flagged flits (once)
//     otherwise                 go-back-N: the whole group again (once),
//                               then deliver and raise `ev_uncorrectable`
//   Mode-1 (adaptive F_P with overflowing packet check over M flits)
//     mid-window, no flag       deliver, no F_P is spent
//     mid-window, flags         ask for F_P now (adaptive F_P), then Mask a
//                               single located bit, else go back
//     end of window             check C_P of the whole window: deliver,
//                               Mask, or go back: drop the group and tell
//                               the sink to discard the window's flits
//                               already delivered (`snk_rollback`)
// Every row or column rewrite updates C_P by the change it makes, so the
// same decision can be taken again. After the first decision of a group
// (Mode-2/3) or at the end of a window (Mode-1) `eval` reports how many C_F
// and C_P errors were seen to the mode controller.
//
// Interfaces: forward link valid/ready/arq, sink valid/ready, one-cycle
// feedback pulses to the transmitter. One word per cycle; a clean group of
// K flits leaves K cycles after F_P plus one decision cycle. The blocks and
// their order (FLIT PAR, T-FIFO, PACK. PAR + Reg, controller, Mask) follow
// the document; the decision order, the retry limits and the encodings are
// this design's choices.
module ppc_rx
  import ppc_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned K       = 4,
  parameter int unsigned M_MAX   = 64,
  parameter int unsigned RETRIES = 1,
  localparam int unsigned MW     = $clog2(M_MAX) + 1,
  localparam int unsigned AW     = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // forward link
  input  logic          in_valid,
  input  flit_kind_e    in_kind,
  input  logic [N:0]    in_data,
  output logic          in_ready,
  output logic          in_arq,
  // sink
  output logic          snk_valid,
  output logic [N-1:0]  snk_data,
  input  logic          snk_ready,
  output logic          snk_rollback,
  output logic [MW-1:0] snk_rollback_len,
  // feedback to the transmitter
  output logic          fb_valid,
  output fb_kind_e      fb_kind,
  output logic [N:0]    fb_arg,
  // mode controller
  input  ppc_mode_e     mode,
  input  logic [MW-1:0] m,
  output logic          eval,
  output logic [1:0]    cf_sum,
  output logic [1:0]    cp_sum,
  // events
  output logic          ev_harq,
  output logic          ev_mask,
  output logic          ev_row,
  output logic          ev_col,
  output logic          ev_goback,
  output logic          ev_fpreq,
  output logic          ev_uncorrectable
);
  localparam int unsigned BW  = $clog2(N + 1);
  localparam int unsigned FBW = $clog2(N + 1);
  localparam int unsigned TW  = $clog2(RETRIES + 1) + 1;
  localparam bit          ROW_HAS_IDX = (ROW_IDX_LSB + BW <= N);

  typedef enum logic [2:0] {R_RECV, R_WAITFP, R_DECIDE, R_COL, R_ROW, R_DELIVER} rx_state_e;
  rx_state_e state;

  ppc_mode_e     mode_q;
  logic [MW-1:0] m_q, wcnt, dlv_win;
  logic [1:0]    cf_win;
  logic          win_end, first, row_tried, col_tried, gb_tried, fp_asked;
  logic [K-1:0]  col_pend, cf_q;
  logic [N:0]    row_pend, fp_q, cp_q;
  logic          mask_en, reload_fp;
  logic [AW-1:0] dcnt;
  logic [TW-1:0] tries;

  // ---------------------------------------------------------------- FLIT PAR
  logic c_f, p_unused;
  ppc_flit_par #(.N(N)) u_par (.data(in_data[N-1:0]), .p_in(in_data[N]), .p(p_unused), .c_f(c_f));

  // ---------------------------------------------------------------- T-FIFO
  logic                f_clr, f_push, f_pop, f_full, f_empty, f_col_we, f_row_we;
  logic [AW:0]         f_count;
  logic [N:0]          f_head, f_col;
  logic [AW-1:0]       f_col_idx;
  logic [FBW-1:0]      f_row_idx;
  logic [K-1:0]        f_row, f_row_wdata;
  logic [K-1:0][N:0]   f_entries;

  ppc_tfifo #(.DEPTH(K), .W(N + 1)) u_tfifo (
    .clk, .rst_n, .clr(f_clr),
    .push(f_push), .push_data(in_data), .pop(f_pop), .head_data(f_head),
    .count(f_count), .full(f_full), .empty(f_empty),
    .col_we(f_col_we), .col_widx(f_col_idx), .col_wdata(in_data),
    .col_ridx(f_col_idx), .col_rdata(f_col),
    .row_we(f_row_we), .row_widx(f_row_idx), .row_wdata(f_row_wdata),
    .row_ridx(f_row_idx), .row_rdata(f_row),
    .entries(f_entries)
  );

  // ---------------------------------------------------------------- PACK. PAR
  logic       acc_clr, acc_en;
  logic [N:0] acc_din, acc;
  ppc_pack_par #(.W(N + 1)) u_pack (.clk, .rst_n, .clr(acc_clr), .en(acc_en), .din(acc_din), .acc(acc));

  // ---------------------------------------------------------------- Mask
  logic masked_unused;
  ppc_mask #(.N(N)) u_mask (
    .en(mask_en), .flit_flagged(cf_q[dcnt]), .flit(f_head), .c_p(cp_q),
    .dout(snk_data), .corrected(masked_unused)
  );

  // ---------------------------------------------------------------- syndromes
  logic [K-1:0] cf_vec;
  int unsigned  nflags, ncp;
  always_comb begin
    nflags = 0;
    ncp    = 0;
    for (int k = 0; k < K; k++) begin
      cf_vec[k] = ^f_entries[k];
      nflags += int'(cf_vec[k]);
    end
    for (int b = 0; b <= N; b++) ncp += int'(acc[b]);
  end

  logic [AW-1:0] col_first;
  always_comb begin
    col_first = '0;
    for (int i = K - 1; i >= 0; i--) if (col_pend[i]) col_first = AW'(i);
  end

  // ---------------------------------------------------------------- link input
  flit_kind_e exp_kind;
  logic       acc_in, row_word_ok;
  logic [BW-1:0] row_b;
  logic       row_delta;
  always_comb begin
    // rows are answered lowest bit index first; a word whose index field
    // does not match was damaged on the way and is not written
    row_b = '0;
    for (int i = N; i >= 0; i--) if (row_pend[i]) row_b = BW'(i);
    row_word_ok = !ROW_HAS_IDX || (BW'(in_data[N-1:0] >> ROW_IDX_LSB) == row_b);
    f_row_idx   = FBW'(row_b);
    f_row_wdata = in_data[K-1:0];
  end

  always_comb begin
    unique case (state)
      R_WAITFP: exp_kind = FK_PARITY;
      R_ROW:    exp_kind = FK_ROW;
      default:  exp_kind = FK_DATA;
    endcase
    in_ready = (state == R_RECV) || (state == R_WAITFP) || (state == R_COL) || (state == R_ROW);
    in_arq   = in_valid && in_ready && c_f && (tries < TW'(RETRIES));
    acc_in   = in_valid && in_ready && !in_arq;
    ev_harq  = in_arq;

    row_delta   = (^f_row) ^ (^in_data[K-1:0]) ^ fp_q[row_b] ^ in_data[K];

    f_col_idx = col_first;
    f_push    = acc_in && (state == R_RECV);
    f_col_we  = acc_in && (state == R_COL);
    f_row_we  = acc_in && (state == R_ROW) && row_word_ok;
    f_pop     = (state == R_DELIVER) && snk_ready;
    snk_valid = (state == R_DELIVER);

    // PACK. PAR input: new flits, F_P, and the change made by a rewrite
    acc_en  = 1'b0;
    acc_din = in_data;
    unique case (state)
      R_RECV, R_WAITFP: acc_en = acc_in;
      R_COL: begin
        acc_en  = acc_in;
        acc_din = f_col ^ in_data;
      end
      R_DELIVER: begin
        acc_en  = reload_fp;
        acc_din = fp_q;
      end
      R_ROW: begin
        acc_en  = f_row_we;
        acc_din = '0;
        acc_din[row_b] = row_delta;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- controller
  logic clean, single;
  assign clean  = (nflags == 0) && (ncp == 0);
  assign single = (nflags == 1) && (ncp == 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= R_RECV;
      mode_q <= MODE_2;
      m_q <= MW'(K);
      wcnt <= '0; dlv_win <= '0; cf_win <= '0;
      win_end <= 1'b0; first <= 1'b0;
      row_tried <= 1'b0; col_tried <= 1'b0; gb_tried <= 1'b0; fp_asked <= 1'b0;
      col_pend <= '0; row_pend <= '0; cf_q <= '0; fp_q <= '0; cp_q <= '0;
      mask_en <= 1'b0; reload_fp <= 1'b0; dcnt <= '0; tries <= '0;
      fb_valid <= 1'b0; fb_kind <= FB_ACK; fb_arg <= '0;
      snk_rollback <= 1'b0; snk_rollback_len <= '0;
      eval <= 1'b0; cf_sum <= '0; cp_sum <= '0;
      ev_mask <= 1'b0; ev_row <= 1'b0; ev_col <= 1'b0; ev_goback <= 1'b0;
      ev_fpreq <= 1'b0; ev_uncorrectable <= 1'b0;
      f_clr <= 1'b0; acc_clr <= 1'b0;
    end else begin
      fb_valid <= 1'b0; snk_rollback <= 1'b0; eval <= 1'b0;
      ev_mask <= 1'b0; ev_row <= 1'b0; ev_col <= 1'b0; ev_goback <= 1'b0;
      ev_fpreq <= 1'b0; ev_uncorrectable <= 1'b0;
      f_clr <= 1'b0; acc_clr <= 1'b0;

      if (acc_in)      tries <= '0;
      else if (in_arq) tries <= tries + 1'b1;

      unique case (state)
        R_RECV: begin
          if (wcnt == '0 && f_count == '0) begin
            mode_q <= mode;
            m_q    <= m;
          end
          if (acc_in) begin
            wcnt <= wcnt + 1'b1;
            if (f_count == (AW+1)'(K - 1)) begin
              win_end <= (mode_q != MODE_1) || (wcnt + 1'b1 == m_q);
              state   <= ((mode_q != MODE_1) || (wcnt + 1'b1 == m_q)) ? R_WAITFP : R_DECIDE;
              first   <= !gb_tried;
            end
          end
        end
        R_WAITFP: if (acc_in) begin
          fp_q  <= in_data;
          state <= R_DECIDE;
        end
        R_COL: if (acc_in) begin
          col_pend[col_first] <= 1'b0;
          if ((col_pend & ~(K'(1) << col_first)) == '0) state <= R_DECIDE;
        end
        R_ROW: if (acc_in) begin
          if (row_word_ok) fp_q[row_b] <= in_data[K];
          row_pend[row_b] <= 1'b0;
          if ((row_pend & ~((N+1)'(1) << row_b)) == '0) state <= R_DECIDE;
        end
        R_DELIVER: begin
          reload_fp <= 1'b0;
          if (snk_ready) begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == AW'(K - 1)) begin
            fb_valid <= 1'b1;
            fb_kind  <= FB_ACK;
            fb_arg   <= '0;
            state    <= R_RECV;
            row_tried <= 1'b0; col_tried <= 1'b0; gb_tried <= 1'b0; fp_asked <= 1'b0;
            if (win_end) begin
              acc_clr <= 1'b1;
              wcnt    <= '0;
              dlv_win <= '0;
              cf_win  <= '0;
            end else begin
              dlv_win <= dlv_win + MW'(K);
            end
          end
          end
        end
        default: begin // R_DECIDE
          first <= 1'b0;
          if (mode_q != MODE_1) begin
            if (first) begin
              eval   <= 1'b1;
              cf_sum <= sat2(nflags);
              cp_sum <= sat2(ncp);
            end
            if (clean || single || (row_tried && col_tried && gb_tried)) begin
              // deliver, correcting a single located bit
              cf_q    <= cf_vec;
              cp_q    <= acc;
              mask_en <= single;
              ev_mask <= single;
              ev_uncorrectable <= !clean && !single;
              dcnt    <= '0;
              state   <= R_DELIVER;
            end else if (nflags == 0 && !row_tried) begin
              row_tried <= 1'b1;
              row_pend  <= acc;
              fb_valid  <= 1'b1; fb_kind <= FB_ROW; fb_arg <= acc;
              ev_row    <= 1'b1;
              state     <= R_ROW;
            end else if (nflags != 0 && !col_tried) begin
              col_tried <= 1'b1;
              col_pend  <= cf_vec;
              fb_valid  <= 1'b1; fb_kind <= FB_COL; fb_arg <= (N+1)'(cf_vec);
              ev_col    <= 1'b1;
              state     <= R_COL;
            end else begin
              // go-back-N over the group; a last try if it was done before
              if (!gb_tried) begin
                gb_tried  <= 1'b1;
                f_clr     <= 1'b1;
                acc_clr   <= 1'b1;
                wcnt      <= '0;
                fb_valid  <= 1'b1; fb_kind <= FB_GOBACK; fb_arg <= '0;
                ev_goback <= 1'b1;
                state     <= R_RECV;
              end else begin
                row_tried <= 1'b1;
                col_tried <= 1'b1;
              end
            end
          end else if (!win_end && nflags == 0) begin
            // Mode-1, clean group inside the window: no F_P needed
            cf_q    <= '0;
            mask_en <= 1'b0;
            dcnt    <= '0;
            state   <= R_DELIVER;
          end else if (!win_end && !fp_asked) begin
            // Mode-1, flagged group: ask for the parity flit (adaptive F_P)
            fp_asked <= 1'b1;
            fb_valid <= 1'b1; fb_kind <= FB_FPREQ; fb_arg <= '0;
            ev_fpreq <= 1'b1;
            state    <= R_WAITFP;
          end else if (single || (win_end && clean)) begin
            // Mode-1: window clean, or one located bit to mask
            cf_q    <= cf_vec;
            cp_q    <= acc;
            mask_en <= single;
            ev_mask <= single;
            dcnt    <= '0;
            state   <= R_DELIVER;
            if (win_end) begin
              eval   <= 1'b1;
              cf_sum <= sat2(int'(cf_win) + nflags);
              cp_sum <= sat2(ncp);
            end else begin
              cf_win <= sat2(int'(cf_win) + nflags);
            end
            // mid-window: the corrected window sum so far equals F_P
            // (C_P ^ F_P ^ correction), so PACK. PAR restarts from F_P
            if (!win_end) begin
              acc_clr   <= 1'b1;
              reload_fp <= 1'b1;
            end
          end else begin
            // Mode-1: more than PPC can locate; rewind the whole window
            eval      <= 1'b1;
            cf_sum    <= sat2(int'(cf_win) + nflags);
            cp_sum    <= sat2(ncp);
            f_clr     <= 1'b1;
            acc_clr   <= 1'b1;
            wcnt      <= '0;
            dlv_win   <= '0;
            cf_win    <= '0;
            fp_asked  <= 1'b0;
            snk_rollback     <= 1'b1;
            snk_rollback_len <= dlv_win;
            fb_valid  <= 1'b1; fb_kind <= FB_GOBACK; fb_arg <= '0;
            ev_goback <= 1'b1;
            state     <= R_RECV;
          end
        end
      endcase
    end
  end

  // a decision is taken on a complete group, delivery reads a stored one
  a_group_full: assert property (@(posedge clk) disable iff (!rst_n)
    (state == R_DECIDE |-> f_full) and (state == R_DELIVER |-> !f_empty));
  // the parity flit is expected only when it is due or was asked for
  a_kind: assert property (@(posedge clk) disable iff (!rst_n)
    acc_in |-> in_kind == exp_kind);
endmodule
