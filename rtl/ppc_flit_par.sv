// ppc_flit_par: per-flit parity, the FLIT PAR block of the PPC scheme.
//
// Encoder side: p = b_0 ^ b_1 ^ ... ^ b_{N-1} (Eq. 1). Checker side:
// C_F = b_0 ^ ... ^ b_{N-1} ^ p_in (Eq. 2); C_F = 1 flags an odd number of
// flipped bits in the flit. Both outputs come from the same XOR tree, so the
// block is purely combinational, zero cycles. The transmitter uses `p`, the
// hops and the receiver use `c_f`.
module ppc_flit_par #(
  parameter int unsigned N = 32           // data bits per flit
) (
  input  logic [N-1:0] data,              // b_0 .. b_{N-1}
  input  logic         p_in,              // received parity bit (0 when encoding)
  output logic         p,                 // parity of the data bits
  output logic         c_f                // flit parity check
);
  always_comb begin
    p   = ^data;
    c_f = p ^ p_in;
  end
endmodule
