// tb_ppc_pack_par: checks the packet parity register. Random groups of code
// words are folded in one per cycle and the result is compared with a
// software XOR; folding F_P in as well must give C_P = 0; clear, and clear
// together with a load, are checked too. One cycle from enable to output.
module tb_ppc_pack_par;
  localparam int unsigned W = 33;
  logic         clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, acc;
  int unsigned  checks = 0, failures = 0;
  always #5 clk = ~clk;

  ppc_pack_par dut (.clk, .rst_n, .clr, .en, .din, .acc);

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (acc !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, acc, exp);
    end
  endtask

  initial begin
    logic [W-1:0] model, fp;
    @(negedge clk); rst_n = 1'b1;
    check('0, "after reset");
    for (int g = 0; g < 50; g++) begin
      int unsigned len;
      len = $urandom_range(1, 64);
      model = '0;
      for (int i = 0; i < len; i++) begin
        din = W'({$urandom, $urandom}); en = 1'b1;
        model ^= din;
        @(negedge clk);
        check(model, "running F_P");
      end
      en = 1'b0;
      fp = model;
      // a pause keeps the value
      @(negedge clk);
      check(model, "hold");
      // folding F_P in gives C_P = 0
      din = fp; en = 1'b1;
      @(negedge clk);
      check('0, "C_P of a clean group");
      // clear with load
      din = W'($urandom); clr = 1'b1; en = 1'b1;
      @(negedge clk);
      check(din, "clear and load");
      clr = 1'b1; en = 1'b0;
      @(negedge clk);
      check('0, "clear");
      clr = 1'b0;
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
