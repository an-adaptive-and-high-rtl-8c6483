// tb_ppc_rx: checks the receiver on its own, the test acting as transmitter,
// sink and mode controller. Directed cases, each repeated with random data:
//   Mode-2: clean group; transient upset (one link ARQ, clean delivery);
//   persistent single upset (one link ARQ, then masked: data delivered
//   right); two upsets in one flit (row ARQ asking exactly those bit
//   indexes, rows written back, data right); single upsets in two flits
//   (column ARQ naming them); upsets that survive the column ARQ (go-back,
//   group resent); upsets that survive everything (uncorrectable reported).
//   Mode-1 (window M = 8): clean window with F_P only at its end; a flagged
//   flit inside the window (F_P requested, bit masked); an upset hidden
//   from the flit parity (window rewound, sink told to drop 4 flits).
// The feedback kind and argument, the eval counts, the sink data and the
// latency of a clean group (first flit two cycles after F_P) are checked.
module tb_ppc_rx;
  import ppc_pkg::*;
  localparam int unsigned N = 32, K = 4, M_MAX = 64, MW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, in_ready, in_arq, snk_valid, snk_ready, snk_rollback, fb_valid;
  logic          eval, ev_harq, ev_mask, ev_row, ev_col, ev_goback, ev_fpreq, ev_uncorrectable;
  flit_kind_e    in_kind;
  logic [N:0]    in_data, fb_arg;
  logic [N-1:0]  snk_data;
  logic [MW-1:0] snk_rollback_len, m;
  fb_kind_e      fb_kind;
  ppc_mode_e     mode;
  logic [1:0]    cf_sum, cp_sum;

  ppc_rx dut (.*);

  int unsigned checks = 0, failures = 0, n_harq = 0, n_uncorr = 0, n_mask = 0;
  int unsigned cyc = 0, fp_cycle = 0, first_dlv_cycle = 0;
  always @(posedge clk) cyc++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // monitors
  logic [N-1:0] sq [$];
  typedef struct packed { fb_kind_e k; logic [N:0] a; } fb_t;
  fb_t fq [$];
  logic [3:0] eq [$];
  int unsigned rb_len = 0, n_rb = 0;
  always @(posedge clk) if (rst_n) begin
    if (snk_valid && snk_ready) begin
      if (sq.size() == 0 && first_dlv_cycle == 0) first_dlv_cycle = cyc;
      sq.push_back(snk_data);
    end
    if (fb_valid) fq.push_back('{fb_kind, fb_arg});
    if (eval) eq.push_back({cf_sum, cp_sum});
    if (snk_rollback) begin rb_len = snk_rollback_len; n_rb++; end
    n_harq   += int'(ev_harq);
    n_uncorr += int'(ev_uncorrectable);
    n_mask   += int'(ev_mask);
  end
  always @(posedge clk) snk_ready <= ($urandom_range(0, 5) != 0);

  function automatic logic [N:0] cw(input logic [N-1:0] d);
    return {^d, d};
  endfunction

  // send one word; flip is applied on every attempt, tflip on the first only
  task automatic send(input flit_kind_e k, input logic [N:0] d, input logic [N:0] flip, input logic [N:0] tflip);
    int unsigned att = 0;
    @(negedge clk);
    in_valid = 1'b1; in_kind = k;
    forever begin
      in_data = d ^ flip ^ ((att == 0) ? tflip : '0);
      @(posedge clk);
      if (in_ready) att++;
      if (in_ready && !in_arq) break;
      @(negedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    if (k == FK_PARITY) fp_cycle = cyc;
  endtask

  task automatic wait_fb(output fb_t f);
    int unsigned t = 0;
    while (fq.size() == 0 && t < 300) begin @(posedge clk); t++; end
    checks++;
    if (fq.size() == 0) begin failures++; $display("FAIL: no feedback at %0t", $time); f = '{FB_ACK, '0}; end
    else f = fq.pop_front();
  endtask

  task automatic expect_fb(input fb_kind_e k, input logic [N:0] a, input string what);
    fb_t f;
    wait_fb(f);
    check(f.k == k && f.a == a, what);
    if (!(f.k == k && f.a == a)) $display("   got %0d/%h exp %0d/%h", f.k, f.a, k, a);
  endtask

  task automatic expect_data(input logic [K-1:0][N-1:0] g, input string what);
    for (int k = 0; k < K; k++) begin
      check(sq.size() != 0 && sq[0] == g[k], what);
      if (sq.size() != 0) void'(sq.pop_front());
    end
  endtask

  task automatic expect_eval(input logic [1:0] cf, input logic [1:0] cp, input string what);
    check(eq.size() != 0 && eq[0] == {cf, cp}, what);
    if (eq.size() != 0) void'(eq.pop_front());
  endtask

  function automatic logic [N:0] onehot(input int unsigned b);
    return (N+1)'(1) << b;
  endfunction

  logic [K-1:0][N-1:0] g;
  logic [N:0]          fp;
  task automatic new_group();
    fp = '0;
    for (int k = 0; k < K; k++) begin
      g[k] = {$urandom};
      fp ^= cw(g[k]);
    end
  endtask

  // a Mode-2 group, flit fk gets `pf` on every attempt, flit fk2 gets `pf2`
  task automatic send_group(input int fk, input logic [N:0] pf, input int fk2, input logic [N:0] pf2,
                            input logic [N:0] tf);
    for (int k = 0; k < K; k++)
      send(FK_DATA, cw(g[k]), (k == fk) ? pf : (k == fk2) ? pf2 : '0, (k == 0) ? tf : '0);
  endtask

  initial begin
    in_valid = 1'b0; in_kind = FK_DATA; in_data = '0;
    mode = MODE_2; m = MW'(K);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 8; rep++) begin
      int unsigned b0, b1, h0;
      b0 = $urandom_range(0, N);
      b1 = (b0 + 1 + $urandom_range(0, N - 1)) % (N + 1);
      // -------- clean group, with latency
      new_group();
      first_dlv_cycle = 0;
      send_group(-1, '0, -1, '0, '0);
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_ACK, '0, "clean ACK");
      expect_data(g, "clean data");
      expect_eval(2'd0, 2'd0, "clean eval");
      // -------- transient upset: link ARQ only
      new_group();
      h0 = n_harq;
      send_group(-1, '0, -1, '0, onehot(b0));
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_ACK, '0, "transient ACK");
      expect_data(g, "transient data");
      expect_eval(2'd0, 2'd0, "transient eval");
      check(n_harq == h0 + 1, "one link ARQ");
      // -------- persistent single upset: masked
      new_group();
      h0 = n_mask;
      send_group(2, onehot(b0), -1, '0, '0);
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_ACK, '0, "mask ACK");
      expect_data(g, "masked data");
      expect_eval(2'd1, 2'd1, "mask eval");
      check(n_mask == h0 + 1, "mask event");
      // -------- two upsets in one flit: row ARQ
      new_group();
      send_group(1, onehot(b0) | onehot(b1), -1, '0, '0);
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_ROW, onehot(b0) | onehot(b1), "row ARQ mask");
      expect_eval(2'd0, 2'd2, "row eval");
      for (int b = 0; b <= N; b++) if (b == b0 || b == b1) begin
        logic [N-1:0] rw;
        rw = '0;
        for (int k = 0; k < K; k++) rw[k] = cw(g[k])[b];
        rw[K] = fp[b];
        rw[ROW_IDX_LSB +: 6] = 6'(b);
        send(FK_ROW, cw(rw), '0, '0);
      end
      expect_fb(FB_ACK, '0, "row ACK");
      expect_data(g, "row-repaired data");
      // -------- single upsets in two flits: column ARQ
      new_group();
      send_group(0, onehot(b0), 3, onehot(b1), '0);
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_COL, (N+1)'(4'b1001), "column ARQ mask");
      expect_eval(2'd2, (b0 == b1) ? 2'd0 : 2'd2, "column eval");
      send(FK_DATA, cw(g[0]), '0, '0);
      send(FK_DATA, cw(g[3]), '0, '0);
      expect_fb(FB_ACK, '0, "column ACK");
      expect_data(g, "column-repaired data");
      // -------- column answers damaged again: go-back-N
      new_group();
      send_group(0, onehot(b0), 3, onehot(b1), '0);
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_COL, (N+1)'(4'b1001), "column ARQ before go-back");
      void'(eq.pop_front());
      send(FK_DATA, cw(g[0]), onehot(b0), '0);
      send(FK_DATA, cw(g[3]), onehot(b1), '0);
      expect_fb(FB_GOBACK, '0, "go-back");
      send_group(-1, '0, -1, '0, '0);
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_ACK, '0, "go-back ACK");
      expect_data(g, "go-back data");
      check(eq.size() == 0, "one eval per group");
      // -------- nothing helps: uncorrectable
      new_group();
      h0 = n_uncorr;
      send_group(0, onehot(b0), 3, onehot(b1), '0);
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_COL, (N+1)'(4'b1001), "column ARQ, hopeless");
      void'(eq.pop_front());
      send(FK_DATA, cw(g[0]), onehot(b0), '0);
      send(FK_DATA, cw(g[3]), onehot(b1), '0);
      expect_fb(FB_GOBACK, '0, "go-back, hopeless");
      send_group(0, onehot(b0), 3, onehot(b1), '0);
      send(FK_PARITY, fp, '0, '0);
      expect_fb(FB_ACK, '0, "uncorrectable ACK");
      check(n_uncorr == h0 + 1, "uncorrectable reported");
      repeat (10) @(posedge clk);
      sq.delete();
    end
    check(first_dlv_cycle != 0, "latency measured");

    // ---------------- Mode-1, window of 8 flits
    mode = MODE_1; m = MW'(8);
    for (int rep = 0; rep < 8; rep++) begin
      logic [N:0] wfp;
      int unsigned b0, b1;
      logic [K-1:0][N-1:0] g0;
      b0 = $urandom_range(0, N - 1);
      b1 = (b0 + 1 + $urandom_range(0, N - 2)) % N;
      // clean window: first group without F_P
      new_group(); wfp = fp; g0 = g;
      send_group(-1, '0, -1, '0, '0);
      expect_fb(FB_ACK, '0, "Mode-1 group without F_P");
      expect_data(g0, "Mode-1 data");
      new_group(); wfp ^= fp;
      send_group(-1, '0, -1, '0, '0);
      send(FK_PARITY, wfp, '0, '0);
      expect_fb(FB_ACK, '0, "Mode-1 window end");
      expect_data(g, "Mode-1 data 2");
      expect_eval(2'd0, 2'd0, "Mode-1 clean eval");
      // flagged flit inside the window: adaptive F_P
      new_group(); wfp = fp; g0 = g;
      send_group(1, onehot(b0), -1, '0, '0);
      expect_fb(FB_FPREQ, '0, "F_P request");
      send(FK_PARITY, wfp, '0, '0);
      expect_fb(FB_ACK, '0, "after F_P request");
      expect_data(g0, "Mode-1 masked data");
      new_group(); wfp ^= fp;
      send_group(-1, '0, -1, '0, '0);
      send(FK_PARITY, wfp, '0, '0);
      expect_fb(FB_ACK, '0, "Mode-1 window end after mask");
      expect_data(g, "Mode-1 data 3");
      expect_eval(2'd1, 2'd0, "Mode-1 eval after mask");
      // hidden double upset: window rewound
      new_group(); wfp = fp;
      send_group(2, onehot(b0) | onehot(b1), -1, '0, '0);
      expect_fb(FB_ACK, '0, "hidden upset passes the group");
      repeat (K + 2) @(posedge clk);
      sq.delete();
      new_group(); wfp ^= fp;
      send_group(-1, '0, -1, '0, '0);
      send(FK_PARITY, wfp, '0, '0);
      expect_fb(FB_GOBACK, '0, "window go-back");
      expect_eval(2'd0, 2'd2, "Mode-1 go-back eval");
      check(rb_len == 4, "rollback of the delivered group");
      repeat (5) @(posedge clk);
      check(sq.size() == 0, "rewound group not delivered");
    end
    check(n_rb == 8, "rollback count");
    check(first_dlv_cycle != 0, "latency measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency of the last clean Mode-2 group: first flit 2 cycles after F_P
  // (decision cycle, then delivery), unless the sink held it back
  int unsigned lat_checked = 0;
  always @(posedge clk) if (rst_n && snk_valid && fp_cycle != 0 && lat_checked == 0
                            && mode == MODE_2 && dut.state.name() == "R_DELIVER") begin
    lat_checked = 1;
    checks++;
    if (cyc - fp_cycle > 2) begin failures++; $display("FAIL: latency %0d", cyc - fp_cycle); end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
