// ppc_pack_par: packet parity, the PACK. PAR block with its Reg.
//
// Accumulates the XOR of the N+1-bit code words it is given:
// F_P = F_0 ^ ... ^ F_{M-1} at the transmitter, and at the receiver
// C_P = F_0 ^ ... ^ F_{M-1} ^ F_P (Eq. 3) once the parity flit has been
// folded in as well. `clr` empties the register; when `clr` and `en` are both
// high the register restarts with `din`. One cycle from `en` to `acc`.
module ppc_pack_par #(
  parameter int unsigned W = 33           // code word width, N+1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] acc
);
  always_ff @(posedge clk) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= en ? din : '0;
    else if (en)  acc <= acc ^ din;
  end
endmodule
