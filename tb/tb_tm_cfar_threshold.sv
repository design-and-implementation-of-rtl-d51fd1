// Self-checking testbench of the adaptive-threshold multiplier. Two
// instances are checked against a 128-bit reference: the default integer
// scale factor and one with 8 fraction bits. The product must appear exactly
// one clock after the operands and saturate when it exceeds 32 bits.
module tb_tm_cfar_threshold;
  import tm_cfar_ref_pkg::*;

  logic clk = 0;
  logic [31:0] a, b, p_int, p_frac;
  int checks = 0, failures = 0;
  int saturated = 0;

  always #5 clk = ~clk;

  tm_cfar_threshold dut_int (.clk, .a, .b, .p(p_int));
  tm_cfar_threshold #(.WIDTH(32), .FRAC_BITS(8)) dut_frac (.clk, .a, .b, .p(p_frac));

  task automatic apply(logic [31:0] va, logic [31:0] vb);
    word_t e_int, e_frac;
    @(negedge clk);
    a = va; b = vb;
    e_int  = ref_threshold(va, vb, 0);
    e_frac = ref_threshold(va, vb, 8);
    if (e_int == 32'hFFFF_FFFF) saturated++;
    @(posedge clk);
    #1;
    checks++;
    if (p_int !== e_int || p_frac !== e_frac) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h/%h expected %h/%h", va, vb, p_int, p_frac, e_int, e_frac);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    apply(100, 7);
    // Latency: the output must not follow a new operand before the edge.
    @(negedge clk);
    a = 1000; b = 3;
    #1;
    checks++;
    if (p_int !== 700) begin
      failures++;
      $display("FAIL output changed before the clock edge: %0d", p_int);
    end
    @(posedge clk);
    #1;
    checks++;
    if (p_int !== 3000) begin
      failures++;
      $display("FAIL one-cycle latency: got %0d expected 3000", p_int);
    end
    apply(32'hFFFF_FFFF, 1);
    apply(32'hFFFF_FFFF, 2);
    apply(32'h0001_0000, 32'h0001_0000);
    apply(32'h0000_FFFF, 32'h0001_0001);
    repeat (2000) apply($urandom & 32'hFFFF, $urandom & 32'h1FFFF);
    repeat (1000) apply($urandom, $urandom);
    checks++;
    if (saturated == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
