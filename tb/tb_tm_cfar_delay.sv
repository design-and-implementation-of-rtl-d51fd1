// Self-checking testbench of the tapped delay line: random samples are
// shifted in with `start` toggled at random; after every clock all 9 taps
// are compared with a software shift register, and a reset must clear them.
module tb_tm_cfar_delay;
  logic clk = 0;
  logic rst_n, start;
  logic [31:0] si;
  logic [31:0] par_out [9];
  logic [31:0] model [9];
  int checks = 0, failures = 0;
  int holds = 0, shifts = 0;

  always #5 clk = ~clk;

  tm_cfar_delay dut (.clk, .rst_n, .start, .si, .par_out);

  task automatic compare(string what);
    checks++;
    for (int i = 0; i < 9; i++) begin
      if (par_out[i] !== model[i]) begin
        failures++;
        $display("FAIL %s: tap %0d = %h expected %h", what, i, par_out[i], model[i]);
        break;
      end
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
    rst_n = 0; start = 0; si = 0;
    for (int i = 0; i < 9; i++) model[i] = 0;
    @(posedge clk); #1;
    compare("reset");
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      start = ($urandom % 4) != 0;
      si = $urandom;
      @(posedge clk);
      if (start) begin
        for (int i = 8; i > 0; i--) model[i] = model[i-1];
        model[0] = si;
        shifts++;
      end else begin
        holds++;
      end
      #1;
      compare(start ? "shift" : "hold");
    end
    @(negedge clk);
    rst_n = 0; start = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 9; i++) model[i] = 0;
    compare("reset wins over start");
    checks++;
    if (holds == 0 || shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
