// tb_ppc_tfifo: checks the transposable FIFO against a software model
// (an array of entries, oldest first). Random pushes, pops, clears, column
// writes and row writes are applied one per cycle, and after each edge the
// head, the count, full/empty, a random column read, a random row read and
// all entries are compared with the model.
module tb_ppc_tfifo;
  localparam int unsigned DEPTH = 4, W = 32;
  localparam int unsigned AW = 2, BW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                clr, push, pop, col_we, row_we, full, empty;
  logic [W-1:0]        push_data, head_data, col_wdata, col_rdata;
  logic [AW:0]         count;
  logic [AW-1:0]       col_widx, col_ridx;
  logic [BW-1:0]       row_widx, row_ridx;
  logic [DEPTH-1:0]    row_wdata, row_rdata;
  logic [DEPTH-1:0][W-1:0] entries;

  ppc_tfifo dut (.*);

  logic [W-1:0] model [DEPTH];
  int unsigned  mcount = 0;
  int unsigned  checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t count=%0d m=%0d push=%b pop=%b clr=%b", what, $time, count, mcount, push, pop, clr);
    end
  endtask

  initial begin
    {clr, push, pop, col_we, row_we} = '0;
    push_data = '0; col_wdata = '0; row_wdata = '0;
    col_widx = '0; col_ridx = '0; row_widx = '0; row_ridx = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int unsigned op;
      {clr, push, pop, col_we, row_we} = '0;
      op = $urandom_range(0, 99);
      push_data = $urandom; col_wdata = $urandom; row_wdata = DEPTH'($urandom);
      col_widx  = AW'($urandom_range(0, DEPTH - 1));
      row_widx  = BW'($urandom_range(0, W - 1));
      if (op < 35)      push = 1'b1;
      else if (op < 60) pop = 1'b1;
      else if (op < 70) begin push = 1'b1; pop = 1'b1; end
      else if (op < 80) col_we = 1'b1;
      else if (op < 95) row_we = 1'b1;
      else              clr = 1'b1;
      @(posedge clk);
      #1;
      // model update (pop first, then append)
      if (clr) mcount = 0;
      else begin
        bit do_push, do_pop;
        do_push = push && (mcount < DEPTH);
        do_pop  = pop && (mcount > 0);
        if (col_we) model[col_widx] = col_wdata;
        if (row_we) for (int k = 0; k < DEPTH; k++) model[k][row_widx] = row_wdata[k];
        if (do_pop) begin
          for (int k = 0; k < DEPTH - 1; k++) model[k] = model[k + 1];
          mcount--;
        end
        if (do_push) begin
          model[mcount] = push_data;
          mcount++;
        end
      end
      // reads
      col_ridx = AW'($urandom_range(0, DEPTH - 1));
      row_ridx = BW'($urandom_range(0, W - 1));
      #1;
      check(count == (AW+1)'(mcount), "count");
      check(full == (mcount == DEPTH) && empty == (mcount == 0), "full/empty");
      if (mcount > 0) check(head_data == model[0], "head");
      if (col_ridx < mcount) check(col_rdata == model[col_ridx], "column read");
      for (int k = 0; k < DEPTH; k++)
        if (k < mcount) begin
          check(row_rdata[k] == model[k][row_ridx], "row read");
          check(entries[k] == model[k], "entries");
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
