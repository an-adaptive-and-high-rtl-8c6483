// ppc_pkg: shared types of the Parity Product Code (PPC) link.
//
// A PPC link carries N-bit data flits, each extended by one parity bit p
// (bit N of the N+1-bit code word), and closes every group of flits with a
// parity flit F_P, the XOR of the group. The types below name the kind of
// code word on the forward channel, the requests the receiver sends back to
// the transmitter, and the three operating modes of the adaptive algorithm.
// The encodings are this design's choice; the document gives none.
package ppc_pkg;

  // Kind of code word on the forward channel (side band, not protected).
  typedef enum logic [1:0] {
    FK_DATA   = 2'd0,   // data flit F_i = {p, b_{N-1} .. b_0}
    FK_PARITY = 2'd1,   // parity flit F_P
    FK_ROW    = 2'd2    // one bit index of the whole group (row ARQ answer)
  } flit_kind_e;

  // Requests from the receiver back to the transmitter.
  typedef enum logic [2:0] {
    FB_ACK    = 3'd0,   // group delivered, release the cached flits
    FB_COL    = 3'd1,   // selective column (flit-index) ARQ, arg = flit mask
    FB_ROW    = 3'd2,   // selective row (bit-index) ARQ, arg = C_P
    FB_GOBACK = 3'd3,   // go-back-N: resend the group / rewind the OPC window
    FB_FPREQ  = 3'd4    // adaptive F_P: send the parity flit now
  } fb_kind_e;

  // Operating modes of the augmented algorithm (Algorithm 3).
  typedef enum logic [1:0] {
    MODE_1 = 2'd1,      // adaptive F_P with overflowing packet check (OPC)
    MODE_2 = 2'd2,      // PPC standalone: F_P after every group
    MODE_3 = 2'd3       // high error rate: PPC, system informed
  } ppc_mode_e;

  // Row-ARQ answer layout inside the N+1-bit word: the K row bits from
  // bit 0, the parity-flit bit pb at bit K, the bit index from ROW_IDX_LSB
  // when the word has room for it.
  localparam int unsigned ROW_IDX_LSB = 16;

  // Saturating 0 / 1 / 2-or-more count of detected errors.
  function automatic logic [1:0] sat2(input int unsigned n);
    return (n >= 2) ? 2'd2 : 2'(n);
  endfunction

endpackage
