// ppc_tfifo: transposable FIFO (T-FIFO), flip-flop based.
//
// Besides push/pop as an ordinary FIFO, any entry can be read or rewritten
// by its position (a "column", one flit) and any bit index can be read or
// rewritten across all entries (a "row", bit b of every flit). Rows are what
// the selective row ARQ needs: the transmitter reads bit b of every cached
// flit, the receiver writes the answer back across its cached flits.
// Positions are logical: position 0 is the oldest entry (the head).
//
// Timing: reset is synchronous (rst_n low at a clock edge). All writes (push, pop, clr, column write, row write) take effect at
// the next clock edge; all reads are combinational. One write kind per cycle
// (clr wins; a push and a pop may share a cycle). Flip-flop storage follows
// the document; the port set is this design's choice.
module ppc_tfifo #(
  parameter int unsigned DEPTH = 4,        // entries (flits)
  parameter int unsigned W     = 32,       // bits per entry
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW   = (W > 1) ? $clog2(W) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  // FIFO side
  input  logic                 push,
  input  logic [W-1:0]         push_data,
  input  logic                 pop,
  output logic [W-1:0]         head_data,
  output logic [AW:0]          count,
  output logic                 full,
  output logic                 empty,
  // column (entry) access
  input  logic                 col_we,
  input  logic [AW-1:0]        col_widx,
  input  logic [W-1:0]         col_wdata,
  input  logic [AW-1:0]        col_ridx,
  output logic [W-1:0]         col_rdata,
  // row (bit-index) access; bit k belongs to entry k
  input  logic                 row_we,
  input  logic [BW-1:0]        row_widx,
  input  logic [DEPTH-1:0]     row_wdata,
  input  logic [BW-1:0]        row_ridx,
  output logic [DEPTH-1:0]     row_rdata,
  // all entries in logical order, for parity trees outside
  output logic [DEPTH-1:0][W-1:0] entries
);
  logic [DEPTH-1:0][W-1:0] mem;
  logic [AW-1:0]           rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] phys(input logic [AW-1:0] base, input int unsigned off);
    return AW'((int'(base) + off) % DEPTH);
  endfunction

  always_comb begin
    for (int unsigned k = 0; k < DEPTH; k++) entries[k] = mem[phys(rd_ptr, k)];
    head_data = entries[0];
    col_rdata = entries[col_ridx];
    for (int unsigned k = 0; k < DEPTH; k++) row_rdata[k] = entries[k][row_ridx];
    full  = (count == (AW+1)'(DEPTH));
    empty = (count == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      mem    <= '0;
    end else if (clr) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full) begin
        mem[wr_ptr] <= push_data;
        wr_ptr      <= phys(wr_ptr, 1);
      end
      if (pop && !empty) rd_ptr <= phys(rd_ptr, 1);
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
      if (col_we) mem[phys(rd_ptr, int'(col_widx))] <= col_wdata;
      if (row_we)
        for (int unsigned k = 0; k < DEPTH; k++) mem[phys(rd_ptr, k)][row_widx] <= row_wdata[k];
    end
  end

  // one kind of random write per cycle, and never together with a push
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(col_we && row_we) && !(push && (col_we || row_we)));
endmodule
