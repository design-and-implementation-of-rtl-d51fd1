// End-to-end testbench of the TM-CFAR detector at its default configuration
// (32-bit samples, 8 reference cells, one cell trimmed at each end).
//
// A clutter-like stream is generated: noise in [100, 200], targets in
// [800, 1500], strong interferers in [2000, 4000] and occasional zero
// drop-outs, with `start` dropped at random to stall the stream. A
// cycle-accurate software model (window shift, insertion sort, trimmed mean,
// saturating multiply, compare) predicts tm_valid on every cycle and TM_out
// whenever it is valid. The run then saturates the threshold with a huge
// scale factor, resets in mid-stream and refills, and uses T = 0. Each
// mechanism is counted and a mechanism that never occurs counts a failure.
module tb_tm_cfar_top;
  import tm_cfar_ref_pkg::*;

  logic clk = 0;
  logic rst_n, start;
  logic [31:0] si, threshold;
  logic TM_out, tm_valid;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_shift = 0, n_stall = 0, n_detect = 0, n_no_detect = 0;
  int n_trim_high_mattered = 0, n_trim_low = 0, n_saturated = 0;
  int n_fill_blocked = 0, n_reset = 0;

  always #5 clk = ~clk;

  tm_cfar_top dut (
    .clk, .rst_n, .start, .si, .threshold, .TM_out, .tm_valid
  );

  // ----------------------------------------------------------- the model
  word_t window [9];
  int    fill;
  bit    v1_prev;
  bit    exp_valid, exp_dec;

  function automatic word_t gen_sample();
    int r = $urandom % 100;
    if (r < 3)  return 0;                          // drop-out
    if (r < 13) return 800 + ($urandom % 701);     // target
    if (r < 23) return 2000 + ($urandom % 2001);   // interferer
    return 100 + ($urandom % 101);                 // noise
  endfunction

  // Called at every rising edge with the inputs the DUT samples there.
  task automatic model_edge();
    if (!rst_n) begin
      exp_valid = 0;
      v1_prev = 0;
      fill = 0;
      for (int i = 0; i < 9; i++) window[i] = 0;
      return;
    end
    exp_valid = v1_prev;
    exp_dec   = ref_decision(window, threshold, 1, 1, 0);
    if (exp_valid) begin
      bit has_zero = 0;
      if (exp_dec) n_detect++; else n_no_detect++;
      if (exp_dec != ref_decision(window, threshold, 0, 0, 0)) n_trim_high_mattered++;
      for (int i = 0; i < 9; i++) if (i != 4 && window[i] == 0) has_zero = 1;
      if (has_zero) n_trim_low++;
      if (ref_threshold(ref_average(window, 1, 1), threshold, 0) == 32'hFFFF_FFFF) n_saturated++;
    end
    v1_prev = start && (fill >= 8);
    if (start) begin
      if (fill < 8) n_fill_blocked++;
      for (int i = 8; i > 0; i--) window[i] = window[i-1];
      window[0] = si;
      if (fill < 9) fill++;
      n_shift++;
    end else begin
      n_stall++;
    end
  endtask

  always @(posedge clk) begin
    model_edge();
    #1;
    checks++;
    if (tm_valid !== exp_valid) begin
      failures++;
      $display("FAIL t=%0t tm_valid=%b expected %b", $time, tm_valid, exp_valid);
    end else if (exp_valid) begin
      checks++;
      if (TM_out !== exp_dec) begin
        failures++;
        $display("FAIL t=%0t TM_out=%b expected %b", $time, TM_out, exp_dec);
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic drive(int samples, int stall_pct);
    repeat (samples) begin
      @(negedge clk);
      start = ($urandom % 100) >= stall_pct;
      si = gen_sample();
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; si = 0; threshold = 3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    drive(4000, 20);                 // trimmed-mean detection, T = 3
    @(negedge clk); threshold = 32'hFFFF_FFFF;
    drive(200, 10);                  // threshold saturates: no detections
    @(negedge clk); rst_n = 0; start = 1; si = 7; n_reset++;
    @(negedge clk); rst_n = 1; threshold = 2;
    drive(2000, 30);                 // refill after reset, T = 2
    @(negedge clk); threshold = 0;
    drive(200, 0);                   // T = 0: any non-zero CUT is a detection
    @(negedge clk); start = 0;
    repeat (4) @(negedge clk);

    $display("shifts=%0d stalls=%0d detections=%0d misses=%0d trim_changed_decision=%0d",
             n_shift, n_stall, n_detect, n_no_detect, n_trim_high_mattered);
    $display("low_outlier_windows=%0d saturated=%0d fill_shifts=%0d resets=%0d",
             n_trim_low, n_saturated, n_fill_blocked, n_reset);
    if (n_shift == 0)              begin failures++; $display("FAIL no shift");                 end
    if (n_stall == 0)              begin failures++; $display("FAIL no stall");                 end
    if (n_detect == 0)             begin failures++; $display("FAIL no detection");             end
    if (n_no_detect == 0)          begin failures++; $display("FAIL no rejected cell");         end
    if (n_trim_high_mattered == 0) begin failures++; $display("FAIL trimming never mattered");  end
    if (n_trim_low == 0)           begin failures++; $display("FAIL no low outlier trimmed");   end
    if (n_saturated == 0)          begin failures++; $display("FAIL no saturated threshold");   end
    if (n_fill_blocked == 0)       begin failures++; $display("FAIL window fill never seen");   end
    if (n_reset == 0)              begin failures++; $display("FAIL no reset");                 end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
