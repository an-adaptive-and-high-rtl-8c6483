// tb_ppc_hop: checks one hop. A sender offers numbered code words and keeps
// each one on the link until it is taken; some carry a transient upset
// (first attempt only), some a persistent one. Expected: clean words pass
// with no ARQ; a transient upset costs exactly one ARQ and the clean word
// passes; a persistent upset is refused RETRIES times and then passes
// damaged. The receiver side applies random back-pressure and refusals;
// words must leave in order, unchanged, and a refused output must be held.
module tb_ppc_hop;
  import ppc_pkg::*;
  localparam int unsigned N = 32, RETRIES = 1, WORDS = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, in_arq, out_valid, out_ready, out_arq, arq_event, pass_bad;
  flit_kind_e in_kind, out_kind;
  logic [N:0] in_data, out_data;

  ppc_hop dut (.*);

  function automatic logic [N:0] word(input int unsigned i);
    logic [N-1:0] d = N'(i * 32'h2545F491 + 7);
    return {^d, d};
  endfunction

  int unsigned checks = 0, failures = 0;
  int unsigned wi = 0, attempts = 0, ri = 0;
  int unsigned kind_of [WORDS];        // 0 clean, 1 transient, 2 persistent
  int unsigned flipbit [WORDS];
  int unsigned arqs    [WORDS];

  always_comb begin
    in_valid = rst_n && (wi < WORDS);
    in_kind  = flit_kind_e'(wi % 3);
    in_data  = word(wi);
    if (wi < WORDS && (kind_of[wi] == 2 || (kind_of[wi] == 1 && attempts == 0)))
      in_data[flipbit[wi]] = ~in_data[flipbit[wi]];
  end

  // sender
  always @(posedge clk) if (rst_n && in_valid) begin
    if (in_arq) begin
      arqs[wi]++;
      attempts <= attempts + 1;
    end
    if (in_ready) attempts <= attempts + 1;
    if (in_ready && !in_arq) begin
      wi <= wi + 1;
      attempts <= 0;
    end
  end

  // receiver
  logic [N:0] held;
  logic       refused;
  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
  end
  assign out_arq = out_valid && (ri % 7 == 3) && !refused;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready && out_arq) begin
      refused <= 1'b1;
      held    <= out_data;
    end
    if (out_valid && out_ready && !out_arq) begin
      logic [N:0] exp;
      exp = word(ri);
      if (kind_of[ri] == 2) exp[flipbit[ri]] = ~exp[flipbit[ri]];
      checks++;
      if (out_data !== exp || out_kind !== flit_kind_e'(ri % 3) || (refused && out_data !== held)) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: got %h exp %h", ri, out_data, exp);
      end
      checks++;
      if (arqs[ri] != ((kind_of[ri] == 0) ? 0 : RETRIES)) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: %0d ARQs for kind %0d", ri, arqs[ri], kind_of[ri]);
      end
      refused <= 1'b0;
      ri <= ri + 1;
    end
  end

  initial begin
    refused = 1'b0; held = '0;
    for (int i = 0; i < WORDS; i++) begin
      int unsigned r;
      r = $urandom_range(0, 9);
      kind_of[i] = (r < 6) ? 0 : (r < 8) ? 1 : 2;
      flipbit[i] = $urandom_range(0, N);
      arqs[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (ri < WORDS) @(posedge clk);
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
