// Testbench of the detector in the other members of the trimmed-mean family
// that the same RTL covers through its parameters:
//   * cell averaging (T1_TRIM = T2_TRIM = 0: all 8 reference cells averaged),
//   * an ordered-statistic-like setting (T1_TRIM = 5, T2_TRIM = 2: only the
//     6th smallest reference cell is kept),
//   * the default trimming with a fixed-point scale factor (FRAC_BITS = 4).
// The three detectors see the same random stream and are each compared with
// the software model on every cycle.
module tb_tm_cfar_modes;
  import tm_cfar_ref_pkg::*;

  localparam int NM = 3;
  localparam int MT1  [NM] = '{0, 5, 1};
  localparam int MT2  [NM] = '{0, 2, 1};
  localparam int MFR  [NM] = '{0, 0, 4};

  logic clk = 0;
  logic rst_n, start;
  logic [31:0] si;
  logic [31:0] thr [NM];
  logic [NM-1:0] TM_out, tm_valid;

  int checks = 0, failures = 0;
  int n_detect [NM] = '{0, 0, 0};
  int n_miss   [NM] = '{0, 0, 0};

  always #5 clk = ~clk;

  tm_cfar_top #(.T1_TRIM(0), .T2_TRIM(0)) dut_ca (
    .clk, .rst_n, .start, .si, .threshold(thr[0]), .TM_out(TM_out[0]), .tm_valid(tm_valid[0]));
  tm_cfar_top #(.T1_TRIM(5), .T2_TRIM(2)) dut_os (
    .clk, .rst_n, .start, .si, .threshold(thr[1]), .TM_out(TM_out[1]), .tm_valid(tm_valid[1]));
  tm_cfar_top #(.FRAC_BITS(4)) dut_frac (
    .clk, .rst_n, .start, .si, .threshold(thr[2]), .TM_out(TM_out[2]), .tm_valid(tm_valid[2]));

  word_t window [9];
  int    fill;
  bit    v1_prev, exp_valid;

  always @(posedge clk) begin
    bit exp_dec [NM];
    if (!rst_n) begin
      exp_valid = 0; v1_prev = 0; fill = 0;
      for (int i = 0; i < 9; i++) window[i] = 0;
    end else begin
      exp_valid = v1_prev;
      for (int m = 0; m < NM; m++) exp_dec[m] = ref_decision(window, thr[m], MT1[m], MT2[m], MFR[m]);
      v1_prev = start && (fill >= 8);
      if (start) begin
        for (int i = 8; i > 0; i--) window[i] = window[i-1];
        window[0] = si;
        if (fill < 9) fill++;
      end
    end
    #1;
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (tm_valid[m] !== exp_valid) begin
        failures++;
        $display("FAIL mode %0d t=%0t tm_valid=%b expected %b", m, $time, tm_valid[m], exp_valid);
      end else if (exp_valid) begin
        if (exp_dec[m]) n_detect[m]++; else n_miss[m]++;
        if (TM_out[m] !== exp_dec[m]) begin
          failures++;
          $display("FAIL mode %0d t=%0t TM_out=%b expected %b", m, $time, TM_out[m], exp_dec[m]);
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; si = 0;
    thr[0] = 3; thr[1] = 3; thr[2] = 40;   // 40 / 16 = 2.5
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4000) begin
      int r;
      @(negedge clk);
      start = ($urandom % 5) != 0;
      r = $urandom % 100;
      if (r < 10)      si = 600 + ($urandom % 900);
      else if (r < 18) si = 2000 + ($urandom % 2000);
      else             si = 100 + ($urandom % 101);
    end
    @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    for (int m = 0; m < NM; m++) begin
      $display("mode %0d: detections=%0d misses=%0d", m, n_detect[m], n_miss[m]);
      checks++;
      if (n_detect[m] == 0 || n_miss[m] == 0) begin
        failures++;
        $display("FAIL mode %0d did not see both outcomes", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
