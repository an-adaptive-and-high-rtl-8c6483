// ppc_tx: PPC transmitter (encoder, T-FIFO and controller).
//
// Flits from the source are collected in a K-entry transposable FIFO until
// it is full. The group is then sent flit by flit; FLIT PAR appends the
// parity bit p and PACK. PAR folds every sent code word into the parity flit
// F_P. In Mode-2/3 F_P follows every group of K flits. In Mode-1 (adaptive
// F_P with overflowing packet check) F_P is sent only at the end of a window
// of M flits, or earlier when the receiver asks for it. The group stays
// cached until the receiver acknowledges it, so it can serve:
//   FB_COL    resend the flits named in a flit mask (column ARQ),
//   FB_ROW    for every bit index set in C_P, send bit b of all K cached
//             flits plus bit b of the last F_P as one ROW word (row ARQ),
//   FB_GOBACK Mode-2/3: resend the whole group and F_P (go-back-N);
//             Mode-1: drop the group and ask the source to rewind the whole
//             window (`src_rewind`, `src_rewind_len` flits), since a window
//             of M > K flits is no longer cached,
//   FB_FPREQ  send the current F_P now (adaptive F_P).
// ROW word layout: row bits at [K-1:0], pb at [K], bit index at
// [ROW_IDX_LSB +: 6] when N leaves room for it (N >= 22); parity p at [N]
// as for every word. N must be at least K+1.
//
// Interfaces: source valid/ready; forward link valid/ready/arq (a word moves
// when valid && ready && !arq, a refused word is held and re-sent);
// one-cycle feedback pulses from the receiver, taken only while waiting.
// Mode and M are sampled at the start of each window. One word per cycle.
// The datapath of the figure (T-FIFO, FLIT PAR, PACK. PAR + Reg, output
// multiplexer) follows the document; the controller's sequencing, the word
// kinds and the feedback encoding are this design's choices.
module ppc_tx
  import ppc_pkg::*;
#(
  parameter int unsigned N     = 32,      // data bits per flit
  parameter int unsigned K     = 4,       // flits per group / T-FIFO depth
  parameter int unsigned M_MAX = 64,      // largest OPC window
  localparam int unsigned MW   = $clog2(M_MAX) + 1,
  localparam int unsigned AW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // source
  input  logic          src_valid,
  input  logic [N-1:0]  src_data,
  output logic          src_ready,
  output logic          src_rewind,
  output logic [MW-1:0] src_rewind_len,
  // mode, shared with the receiver
  input  ppc_mode_e     mode,
  input  logic [MW-1:0] m,
  // feedback from the receiver
  input  logic          fb_valid,
  input  fb_kind_e      fb_kind,
  input  logic [N:0]    fb_arg,
  // forward link
  output logic          out_valid,
  output flit_kind_e    out_kind,
  output logic [N:0]    out_data,
  input  logic          out_ready,
  input  logic          out_arq
);
  localparam int unsigned BW  = $clog2(N + 1);
  localparam int unsigned FBW = (N > 1) ? $clog2(N) : 1;
  // the row index travels in the row word only when it fits
  localparam bit          ROW_HAS_IDX = (ROW_IDX_LSB + BW <= N);

  typedef enum logic [2:0] {T_FILL, T_SEND, T_FP, T_WAIT, T_COL, T_ROW} tx_state_e;
  tx_state_e state;

  ppc_mode_e     mode_q;
  logic [MW-1:0] m_q, wcnt;
  logic [AW-1:0] idx;
  logic          fp_req, win_closed;
  logic [N:0]    fp_last;
  logic [K-1:0]  col_pend;
  logic [N:0]    row_pend;

  // T-FIFO
  logic                 f_clr, f_push;
  logic [AW:0]          f_count;
  logic                 f_full, f_empty;
  logic [N-1:0]         f_head, f_col;
  logic [AW-1:0]        f_col_ridx;
  logic [FBW-1:0]       f_row_ridx;
  logic [K-1:0]         f_row;
  logic [K-1:0][N-1:0]  f_entries;

  ppc_tfifo #(.DEPTH(K), .W(N)) u_tfifo (
    .clk, .rst_n, .clr(f_clr),
    .push(f_push), .push_data(src_data), .pop(1'b0), .head_data(f_head),
    .count(f_count), .full(f_full), .empty(f_empty),
    .col_we(1'b0), .col_widx('0), .col_wdata('0),
    .col_ridx(f_col_ridx), .col_rdata(f_col),
    .row_we(1'b0), .row_widx('0), .row_wdata('0),
    .row_ridx(f_row_ridx), .row_rdata(f_row),
    .entries(f_entries)
  );

  // PACK. PAR + Reg
  logic       acc_clr, acc_en;
  logic [N:0] acc;
  ppc_pack_par #(.W(N + 1)) u_pack (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en), .din(out_data), .acc(acc)
  );

  // FLIT PAR on the outgoing word
  logic [N-1:0] word;
  logic         word_p, p_chk_unused;
  ppc_flit_par #(.N(N)) u_par (.data(word), .p_in(1'b0), .p(word_p), .c_f(p_chk_unused));

  // lowest set bits of the pending masks
  logic [AW-1:0] col_first;
  logic [BW-1:0] row_first;
  always_comb begin
    col_first = '0;
    for (int i = K - 1; i >= 0; i--) if (col_pend[i]) col_first = AW'(i);
    row_first = '0;
    for (int i = N; i >= 0; i--) if (row_pend[i]) row_first = BW'(i);
  end

  // row word: bit row_first of every cached flit; index N is the p column
  logic [K-1:0] row_bits;
  always_comb begin
    for (int k = 0; k < K; k++)
      row_bits[k] = (row_first == BW'(N)) ? ^f_entries[k] : f_row[k];
  end

  logic xfer, last_of_group, win_end;
  always_comb begin
    f_row_ridx = FBW'(row_first);
    f_col_ridx = (state == T_COL) ? col_first : idx;
    last_of_group = (idx == AW'(K - 1));
    win_end    = (mode_q != MODE_1) || (wcnt + 1'b1 == m_q);

    word      = f_col;
    out_kind  = FK_DATA;
    out_valid = 1'b0;
    unique case (state)
      T_SEND: out_valid = 1'b1;
      T_COL:  out_valid = 1'b1;
      T_FP: begin
        out_valid = 1'b1;
        out_kind  = FK_PARITY;
        word      = acc[N-1:0];
      end
      T_ROW: begin
        out_valid = 1'b1;
        out_kind  = FK_ROW;
        word      = '0;
        word[K-1:0] = row_bits;
        word[K]     = fp_last[row_first];
        if (ROW_HAS_IDX) word = word | (N'(row_first) << ROW_IDX_LSB);
      end
      default: ;
    endcase
    out_data = (state == T_FP) ? acc : {word_p, word};
    xfer     = out_valid && out_ready && !out_arq;

    src_ready = (state == T_FILL) && !f_full;
    f_push    = src_valid && src_ready;
    acc_en    = (state == T_SEND) && xfer;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= T_FILL;
      mode_q     <= MODE_2;
      m_q        <= MW'(K);
      wcnt       <= '0;
      idx        <= '0;
      fp_req     <= 1'b0;
      win_closed <= 1'b0;
      fp_last    <= '0;
      col_pend   <= '0;
      row_pend   <= '0;
      src_rewind <= 1'b0;
      src_rewind_len <= '0;
      f_clr      <= 1'b0;
      acc_clr    <= 1'b0;
    end else begin
      src_rewind <= 1'b0;
      f_clr      <= 1'b0;
      acc_clr    <= 1'b0;
      unique case (state)
        T_FILL: begin
          if (f_full && !f_clr) begin
            state <= T_SEND;
            idx   <= '0;
            if (wcnt == '0) begin
              mode_q <= mode;
              m_q    <= m;
            end
          end
        end
        T_SEND: if (xfer) begin
          idx  <= idx + 1'b1;
          wcnt <= wcnt + 1'b1;
          if (last_of_group) begin
            fp_req <= 1'b0;
            state  <= win_end ? T_FP : T_WAIT;
          end
        end
        T_FP: if (xfer) begin
          fp_last <= acc;
          if (!fp_req) win_closed <= 1'b1;
          state <= T_WAIT;
        end
        T_COL: if (xfer) begin
          col_pend[col_first] <= 1'b0;
          if ((col_pend & ~(K'(1) << col_first)) == '0) state <= T_WAIT;
        end
        T_ROW: if (xfer) begin
          row_pend[row_first] <= 1'b0;
          if ((row_pend & ~((N+1)'(1) << row_first)) == '0) state <= T_WAIT;
        end
        default: begin // T_WAIT
          if (fb_valid) begin
            unique case (fb_kind)
              FB_ACK: begin
                f_clr <= 1'b1;
                state <= T_FILL;
                if (win_closed) begin
                  acc_clr    <= 1'b1;
                  wcnt       <= '0;
                  win_closed <= 1'b0;
                end
              end
              FB_COL: begin
                col_pend <= fb_arg[K-1:0];
                state    <= T_COL;
              end
              FB_ROW: begin
                row_pend <= fb_arg;
                state    <= T_ROW;
              end
              FB_FPREQ: begin
                fp_req <= 1'b1;
                state  <= T_FP;
              end
              default: begin // FB_GOBACK
                acc_clr    <= 1'b1;
                win_closed <= 1'b0;
                wcnt       <= '0;
                if (mode_q == MODE_1) begin
                  f_clr          <= 1'b1;
                  src_rewind     <= 1'b1;
                  src_rewind_len <= wcnt;
                  state          <= T_FILL;
                end else begin
                  idx   <= '0;
                  state <= T_SEND;
                end
              end
            endcase
          end
        end
      endcase
    end
  end

  // outside T_FILL the whole group is cached
  a_group_cached: assert property (@(posedge clk) disable iff (!rst_n)
    state != T_FILL |-> f_full && !f_empty && f_count == (AW+1)'(K) && f_head == f_entries[0]);
  // feedback only arrives while the transmitter waits for it
  a_fb_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    fb_valid |-> state == T_WAIT);
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !(out_ready && !out_arq) |=> out_valid && $stable(out_data));
endmodule
