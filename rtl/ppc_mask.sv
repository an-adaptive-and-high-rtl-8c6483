// ppc_mask: forward correction of a single flipped bit while reading out.
//
// A single upset in a group shows as C_F = 1 for its flit and C_P = 1 at its
// bit index (the crossing of the two checks). When `en` is high and the flit
// being read is the one flagged by C_F (`flit_flagged`), every bit where
// C_P is 1 is inverted; otherwise the flit passes unchanged. The parity bit
// (bit N) is dropped and the N data bits are returned. Combinational.
// Bit N of the corrected word is therefore never read: an upset that hit the
// parity bit itself leaves the data right, and the mask has nothing to do.
module ppc_mask #(
  parameter int unsigned N = 32
) (
  input  logic         en,                // a single SEU was located
  input  logic         flit_flagged,      // C_F of the flit being read
  input  logic [N:0]   flit,              // code word from the FIFO
  input  logic [N:0]   c_p,               // packet parity check
  output logic [N-1:0] dout,              // corrected data
  output logic         corrected          // a bit was flipped
);
  logic [N:0] fixed;
  always_comb begin
    corrected = en && flit_flagged;
    fixed     = corrected ? (flit ^ c_p) : flit;
    dout      = fixed[N-1:0];
  end
endmodule
