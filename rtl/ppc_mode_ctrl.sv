// ppc_mode_ctrl: the augmented algorithm that adapts PPC to the error rate.
//
// After each checked group (an `eval` pulse carrying how many flit checks
// C_F and how many packet-check bits C_P fired, each counted 0, 1 or 2+),
// it moves between three modes (Algorithm 3):
//   Mode-1 adaptive F_P with overflowing packet check (OPC): a clean window
//          doubles the window M, an error halves it; reaching M = K returns
//          to Mode-2.
//   Mode-2 PPC standalone: a clean group moves to Mode-1, two or more
//          errors move to Mode-3.
//   Mode-3 high error rate: at most one error of each kind returns to
//          Mode-2; otherwise `high_err` informs the system.
// Outputs change one cycle after `eval`. The doubling, halving and the mode
// moves follow the document; starting in Mode-2 with M = K, the upper bound
// M_MAX and treating "M == K" as "M <= K" are this design's choices.
module ppc_mode_ctrl
  import ppc_pkg::*;
#(
  parameter int unsigned K     = 4,       // flits cached by the T-FIFOs
  parameter int unsigned M_MAX = 64,      // largest OPC window
  localparam int unsigned MW   = $clog2(M_MAX) + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         eval,
  input  logic [1:0]   cf_sum,            // C_F errors: 0, 1, 2 = two or more
  input  logic [1:0]   cp_sum,            // C_P bits set: 0, 1, 2 = two or more
  output ppc_mode_e    mode,
  output logic [MW-1:0] m,                // flits covered by one F_P
  output logic         high_err           // Mode-3 and still many errors
);
  logic clean;
  assign clean = (cf_sum == 2'd0) && (cp_sum == 2'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode     <= MODE_2;
      m        <= MW'(K);
      high_err <= 1'b0;
    end else if (eval) begin
      high_err <= 1'b0;
      unique case (mode)
        MODE_1: begin
          if (clean) begin
            if (m < MW'(M_MAX)) m <= m << 1;
          end else if ((m >> 1) <= MW'(K)) begin
            m    <= MW'(K);
            mode <= MODE_2;
          end else begin
            m <= m >> 1;
          end
        end
        MODE_2: begin
          if (clean)                              mode <= MODE_1;
          else if (cp_sum >= 2'd2 || cf_sum >= 2'd2) mode <= MODE_3;
        end
        default: begin // MODE_3
          if (cp_sum <= 2'd1 && cf_sum <= 2'd1) mode <= MODE_2;
          else                                  high_err <= 1'b1;
        end
      endcase
    end
  end
endmodule
