// Self-checking testbench of the trimming-and-average block: the output must
// be floor(sum of the 6 inputs / 6), including sums that exceed 32 bits.
module tb_tm_cfar_trim_avg;
  logic [31:0] z [6];
  logic [31:0] aver;
  int checks = 0, failures = 0;

  tm_cfar_trim_avg #(.WIDTH(32), .N_IN(6)) dut (.z, .aver);

  task automatic apply();
    longint unsigned sum = 0;
    longint unsigned expected;
    for (int i = 0; i < 6; i++) sum += longint'(z[i]);
    expected = sum / 6;
    #1;
    checks++;
    if (longint'(aver) != expected) begin
      failures++;
      $display("FAIL sum=%0d aver=%0d expected %0d", sum, aver, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) z[i] = 32'hFFFF_FFFF;
    apply();
    for (int i = 0; i < 6; i++) z[i] = 0;
    apply();
    for (int i = 0; i < 6; i++) z[i] = i + 1;   // 21 / 6 = 3
    apply();
    repeat (3000) begin
      for (int i = 0; i < 6; i++) z[i] = $urandom;
      apply();
    end
    repeat (1000) begin
      for (int i = 0; i < 6; i++) z[i] = $urandom & 32'hFF;
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
