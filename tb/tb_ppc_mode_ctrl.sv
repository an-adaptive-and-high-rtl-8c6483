// tb_ppc_mode_ctrl: checks the augmented mode algorithm against a software
// model of its rules: random streams of evaluation results (0, 1 or 2+
// errors of each kind, with long clean runs so the window grows to its
// limit) are applied, and mode, window M and the high-error flag are
// compared after every evaluation. Outputs must follow one cycle after eval.
module tb_ppc_mode_ctrl;
  import ppc_pkg::*;
  localparam int unsigned K = 4, M_MAX = 64, MW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          eval = 1'b0, high_err;
  logic [1:0]    cf_sum = '0, cp_sum = '0;
  ppc_mode_e     mode;
  logic [MW-1:0] m;

  ppc_mode_ctrl dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned seen_m1 = 0, seen_m3 = 0, seen_max = 0, seen_high = 0;

  initial begin
    int unsigned em, mm;
    bit          eh;
    em = 2; mm = K; eh = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int unsigned r;
      bit clean;
      r = $urandom_range(0, 99);
      // phases: mostly clean, then noisy, then heavy
      if ((t / 300) % 3 == 0)      begin cf_sum = (r < 95) ? 2'd0 : 2'd1; cp_sum = (r < 95) ? 2'd0 : 2'd1; end
      else if ((t / 300) % 3 == 1) begin cf_sum = 2'($urandom_range(0, 1)); cp_sum = 2'($urandom_range(0, 1)); end
      else                         begin cf_sum = 2'($urandom_range(0, 2)); cp_sum = 2'($urandom_range(1, 2)); end
      eval = ($urandom_range(0, 3) != 0);
      // model
      if (eval) begin
        clean = (cf_sum == 0) && (cp_sum == 0);
        eh = 0;
        case (em)
          1: if (clean) begin if (mm < M_MAX) mm = mm * 2; end
             else if (mm / 2 <= K) begin mm = K; em = 2; end
             else mm = mm / 2;
          2: if (clean) em = 1;
             else if (cp_sum >= 2 || cf_sum >= 2) em = 3;
          default: if (cp_sum <= 1 && cf_sum <= 1) em = 2; else eh = 1;
        endcase
      end
      @(negedge clk);
      checks++;
      if (int'(mode) != em || int'(m) != mm || high_err != eh) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: mode %0d/%0d m %0d/%0d high %b/%b", t, mode, em, m, mm, high_err, eh);
      end
      seen_m1   += int'(em == 1);
      seen_m3   += int'(em == 3);
      seen_max  += int'(mm == M_MAX);
      seen_high += int'(eh);
    end
    checks++;
    if (seen_m1 == 0 || seen_m3 == 0 || seen_max == 0 || seen_high == 0) begin
      failures++;
      $display("FAIL: coverage m1=%0d m3=%0d max=%0d high=%0d", seen_m1, seen_m3, seen_max, seen_high);
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
