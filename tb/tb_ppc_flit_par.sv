// tb_ppc_flit_par: checks the flit parity encoder and checker against a
// bit-by-bit parity count, for random flits, with and without upsets: one
// flipped bit must raise C_F, two must not.
module tb_ppc_flit_par;
  localparam int unsigned N = 32;
  logic [N-1:0] data;
  logic         p_in, p, c_f;
  int unsigned  checks = 0, failures = 0;

  ppc_flit_par dut (.data, .p_in, .p, .c_f);

  function automatic logic ref_par(input logic [N-1:0] d);
    int unsigned ones = 0;
    for (int i = 0; i < N; i++) ones += int'(d[i]);
    return ones[0];
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: data=%h got %b exp %b", what, data, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] clean;
      logic         pe;
      int unsigned  a, b;
      clean = {$urandom, $urandom};
      // encode
      data = clean; p_in = 1'b0; #1;
      check(p, ref_par(clean), "p");
      pe = p;
      // clean code word: C_F = 0
      p_in = pe; #1;
      check(c_f, 1'b0, "clean C_F");
      // one upset in the data or in p: C_F = 1
      a = $urandom_range(0, N);
      if (a == N) begin data = clean; p_in = ~pe; end
      else begin data = clean ^ (N'(1) << a); p_in = pe; end
      #1;
      check(c_f, 1'b1, "single C_F");
      // two upsets in the data: C_F = 0 (not detectable by flit parity)
      a = $urandom_range(0, N - 1);
      b = (a + 1 + $urandom_range(0, N - 2)) % N;
      data = clean ^ (N'(1) << a) ^ (N'(1) << b); p_in = pe; #1;
      check(c_f, 1'b0, "double C_F");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
