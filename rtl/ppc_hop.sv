// ppc_hop: one router hop of the PPC link: parity check, ARQ and a FIFO.
//
// Every code word arriving on the input link is checked with FLIT PAR. A
// failing check is answered with `in_arq` in the same cycle instead of
// accepting the word, so the upstream sender keeps it on the link and sends
// it again (hybrid ARQ against upsets on the wire). After RETRIES refused
// attempts of the same word the hop accepts it anyway: the upset happened
// before the link and only the end-to-end PPC can repair it.
//
// Link protocol (both sides): a word moves when valid && ready && !arq.
// Upstream must hold the word while it is refused. The FIFO adds one cycle.
// The check-then-buffer structure follows the document; the FIFO depth,
// the retry limit and the handshake are this design's choices.
module ppc_hop
  import ppc_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned DEPTH   = 4,
  parameter int unsigned RETRIES = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  flit_kind_e  in_kind,
  input  logic [N:0]  in_data,
  output logic        in_ready,
  output logic        in_arq,
  output logic        out_valid,
  output flit_kind_e  out_kind,
  output logic [N:0]  out_data,
  input  logic        out_ready,
  input  logic        out_arq,
  output logic        arq_event,          // a retransmission was requested
  output logic        pass_bad            // a failing word was let through
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned TW = $clog2(RETRIES + 1) + 1;

  flit_kind_e         kind_q [DEPTH];
  logic [N:0]         data_q [DEPTH];
  logic [AW-1:0]      rd_ptr, wr_ptr;
  logic [AW:0]        count;
  logic [TW-1:0]      tries;
  logic               c_f, p_unused, push, pop;

  ppc_flit_par #(.N(N)) u_par (
    .data(in_data[N-1:0]), .p_in(in_data[N]), .p(p_unused), .c_f(c_f)
  );

  always_comb begin
    in_ready  = (count != (AW+1)'(DEPTH));
    in_arq    = in_valid && in_ready && c_f && (tries < TW'(RETRIES));
    push      = in_valid && in_ready && !in_arq;
    out_valid = (count != '0);
    out_kind  = kind_q[rd_ptr];
    out_data  = data_q[rd_ptr];
    pop       = out_valid && out_ready && !out_arq;
    arq_event = in_arq;
    pass_bad  = push && c_f;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      tries  <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        kind_q[i] <= FK_DATA;
        data_q[i] <= '0;
      end
    end else begin
      if (push) begin
        kind_q[wr_ptr] <= in_kind;
        data_q[wr_ptr] <= in_data;
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (push)        tries <= '0;
      else if (in_arq) tries <= tries + 1'b1;
    end
  end

  // upstream must not withdraw a refused word
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_arq |=> in_valid);
endmodule
