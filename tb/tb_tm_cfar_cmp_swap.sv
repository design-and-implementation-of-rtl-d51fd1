// Self-checking testbench of the compare-exchange cell: out1 must be the
// minimum and out2 the maximum of the two inputs, for random, equal and
// extreme values.
module tb_tm_cfar_cmp_swap;
  logic [31:0] in1, in2, out1, out2;
  int checks = 0, failures = 0;

  tm_cfar_cmp_swap #(.WIDTH(32)) dut (.in1, .in2, .out1, .out2);

  task automatic apply(logic [31:0] a, logic [31:0] b);
    logic [31:0] mn, mx;
    in1 = a; in2 = b;
    #1;
    mn = (a < b) ? a : b;
    mx = (a < b) ? b : a;
    checks++;
    if (out1 !== mn || out2 !== mx) begin
      failures++;
      $display("FAIL in=(%h,%h) out=(%h,%h) expected (%h,%h)", a, b, out1, out2, mn, mx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0);
    apply(32'hFFFF_FFFF, 0);
    apply(0, 32'hFFFF_FFFF);
    apply(32'h8000_0000, 32'h7FFF_FFFF);
    apply(5, 5);
    repeat (2000) apply($urandom, $urandom);
    repeat (200) apply($urandom & 32'hF, $urandom & 32'hF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
