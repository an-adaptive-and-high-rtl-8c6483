// tb_ppc_tx: checks the transmitter on its own, the test acting as source
// and receiver. Every group must arrive as K data words with correct parity
// bits, followed by F_P (Mode-2 always; Mode-1 only at the end of the
// window or when asked). The test then answers with random feedback and
// checks what comes back: ACK releases the group; a column ARQ resends
// exactly the flits asked for; a row ARQ sends, lowest index first, bit b
// of every cached flit with bit b of F_P; go-back resends the group and F_P
// (Mode-2) or rewinds the source by the window length (Mode-1); an F_P
// request returns the XOR of the window so far. The link refuses words at
// random; a refused word must be held.
module tb_ppc_tx;
  import ppc_pkg::*;
  localparam int unsigned N = 32, K = 4, M_MAX = 64, MW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          src_valid, src_ready, src_rewind, fb_valid, out_valid, out_ready, out_arq;
  logic [N-1:0]  src_data;
  logic [MW-1:0] src_rewind_len, m;
  ppc_mode_e     mode;
  fb_kind_e      fb_kind;
  logic [N:0]    fb_arg, out_data;
  flit_kind_e    out_kind;

  ppc_tx dut (.*);

  function automatic logic [N-1:0] gen(input int unsigned i);
    return N'(i * 32'h61C88647) ^ N'(32'hC3A5_0001 + i);
  endfunction
  function automatic logic [N:0] cw(input logic [N-1:0] d);
    return {^d, d};
  endfunction

  int unsigned checks = 0, failures = 0, sp = 0;
  int unsigned n_rewind = 0, n_col = 0, n_row = 0, n_gb = 0, n_fpreq = 0, n_hold = 0;

  // source
  assign src_valid = rst_n;
  assign src_data  = gen(sp);
  always @(posedge clk) if (rst_n) begin
    if (src_rewind) begin
      n_rewind++;
      sp <= sp - int'(src_rewind_len);
    end else if (src_valid && src_ready) sp <= sp + 1;
  end

  // link: random refusals, words collected in a queue
  typedef struct packed { flit_kind_e kind; logic [N:0] data; } word_t;
  word_t q [$];
  logic [N:0] last_refused;
  bit         was_refused = 0;
  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 4) != 0);
  end
  always @(negedge clk) out_arq = out_valid && ($urandom_range(0, 9) == 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (was_refused) begin
      checks++;
      n_hold++;
      if (out_data !== last_refused) begin failures++; $display("FAIL: refused word not held"); end
    end
    if (out_arq) begin
      was_refused  <= 1'b1;
      last_refused <= out_data;
    end else begin
      was_refused <= 1'b0;
      q.push_back('{out_kind, out_data});
    end
  end

  task automatic expect_word(input flit_kind_e k, input logic [N:0] d, input string what);
    word_t w;
    int unsigned t = 0;
    while (q.size() == 0) begin @(posedge clk); t++; if (t > 200) break; end
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL %s: nothing arrived", what); return; end
    w = q.pop_front();
    if (w.kind !== k || w.data !== d) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d/%h exp %0d/%h", what, w.kind, w.data, k, d);
    end
  endtask

  task automatic send_fb(input fb_kind_e k, input logic [N:0] a);
    repeat (2) @(posedge clk);
    @(negedge clk);
    fb_valid = 1'b1; fb_kind = k; fb_arg = a;
    @(negedge clk);
    fb_valid = 1'b0;
  endtask

  task automatic expect_nothing(input string what);
    repeat (12) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %s: unexpected word", what); void'(q.pop_front()); end
  endtask

  initial begin
    int unsigned base, wbase;
    logic [N:0] fp, wfp;
    fb_valid = 1'b0; fb_kind = FB_ACK; fb_arg = '0;
    mode = MODE_2; m = MW'(K);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    base = 0;
    // ---------------- Mode-2: F_P after every group, all ARQ kinds
    for (int g = 0; g < 60; g++) begin
      int unsigned r;
      fp = '0;
      for (int k = 0; k < K; k++) begin
        expect_word(FK_DATA, cw(gen(base + k)), "group flit");
        fp ^= cw(gen(base + k));
      end
      expect_word(FK_PARITY, fp, "F_P");
      r = g % 5;
      if (r == 1) begin
        logic [K-1:0] cm;
        cm = K'($urandom_range(1, (1 << K) - 1));
        send_fb(FB_COL, (N+1)'(cm));
        n_col++;
        for (int k = 0; k < K; k++) if (cm[k]) expect_word(FK_DATA, cw(gen(base + k)), "column ARQ");
      end else if (r == 2) begin
        logic [N:0] rm;
        rm = '0;
        rm[$urandom_range(0, N)] = 1'b1;
        rm[$urandom_range(0, N)] = 1'b1;
        send_fb(FB_ROW, rm);
        n_row++;
        for (int b = 0; b <= N; b++) if (rm[b]) begin
          logic [N-1:0] rw;
          rw = '0;
          for (int k = 0; k < K; k++) rw[k] = cw(gen(base + k))[b];
          rw[K] = fp[b];
          rw[ROW_IDX_LSB +: 6] = 6'(b);
          expect_word(FK_ROW, cw(rw), "row ARQ");
        end
      end else if (r == 3) begin
        send_fb(FB_GOBACK, '0);
        n_gb++;
        for (int k = 0; k < K; k++) expect_word(FK_DATA, cw(gen(base + k)), "go-back flit");
        expect_word(FK_PARITY, fp, "go-back F_P");
      end
      send_fb(FB_ACK, '0);
      base += K;
    end
    // ---------------- Mode-1: window of 16 flits, adaptive F_P, rewinds
    mode = MODE_1; m = MW'(16);
    for (int w = 0; w < 20; w++) begin
      bit rewound;
      rewound = 0;
      wbase = base;
      wfp = '0;
      for (int g = 0; g < 4 && !rewound; g++) begin
        for (int k = 0; k < K; k++) begin
          expect_word(FK_DATA, cw(gen(base + k)), "window flit");
          wfp ^= cw(gen(base + k));
        end
        if (g == 3) expect_word(FK_PARITY, wfp, "window F_P");
        else if (w % 3 == 1 && g == 1) begin
          send_fb(FB_FPREQ, '0);
          n_fpreq++;
          expect_word(FK_PARITY, wfp, "requested F_P");
        end else expect_nothing("no F_P inside the window");
        if (w % 4 == 2 && g == 2) begin
          int unsigned n_before;
          n_before = n_rewind;
          send_fb(FB_GOBACK, '0);
          repeat (2) @(posedge clk);
          checks++;
          if (n_rewind != n_before + 1 || int'(src_rewind_len) != (g + 1) * K) begin
            failures++;
            $display("FAIL: rewind len %0d exp %0d", src_rewind_len, (g + 1) * K);
          end
          base = wbase;
          rewound = 1;
        end else begin
          send_fb(FB_ACK, '0);
          base += K;
        end
      end
    end
    checks++;
    if (n_col == 0 || n_row == 0 || n_gb == 0 || n_fpreq == 0 || n_rewind == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
