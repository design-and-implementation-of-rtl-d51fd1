// Self-checking testbench of the detection comparator: q = a > b, strictly,
// unsigned.
module tb_tm_cfar_comparator;
  logic [31:0] a, b;
  logic q;
  int checks = 0, failures = 0;

  tm_cfar_comparator #(.WIDTH(32)) dut (.a, .b, .q);

  task automatic apply(logic [31:0] va, logic [31:0] vb);
    a = va; b = vb;
    #1;
    checks++;
    if (q !== (va > vb)) begin
      failures++;
      $display("FAIL a=%h b=%h q=%b", va, vb, q);
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
    apply(10, 10);
    apply(11, 10);
    apply(10, 11);
    apply(32'h8000_0000, 32'h7FFF_FFFF);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    repeat (2000) begin
      automatic logic [31:0] r = $urandom;
      apply(r, $urandom);
      apply(r, r);
      apply(r + 1, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
