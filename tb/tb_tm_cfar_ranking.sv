// Self-checking testbench of the 8-input ranking network. All 256 zero/one
// patterns are applied (by the zero-one principle a comparator network that
// sorts them sorts every input), then random words with and without
// duplicates; each result is compared with an insertion sort of the inputs.
module tb_tm_cfar_ranking;
  import tm_cfar_ref_pkg::*;

  logic [31:0] in_cells [8];
  logic [31:0] out_sorted [8];
  int checks = 0, failures = 0;

  tm_cfar_ranking #(.WIDTH(32)) dut (.in_cells, .out_sorted);

  task automatic apply();
    word_t expect_v[] = new[8];
    for (int i = 0; i < 8; i++) expect_v[i] = in_cells[i];
    sort_words(expect_v, 8);
    #1;
    checks++;
    for (int i = 0; i < 8; i++) begin
      if (out_sorted[i] !== expect_v[i]) begin
        failures++;
        $display("FAIL lane %0d: got %h expected %h", i, out_sorted[i], expect_v[i]);
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
    for (int pat = 0; pat < 256; pat++) begin
      for (int i = 0; i < 8; i++) in_cells[i] = pat[i] ? 32'hFFFF_FFFF : 32'h0;
      apply();
    end
    repeat (3000) begin
      for (int i = 0; i < 8; i++) in_cells[i] = $urandom;
      apply();
    end
    repeat (1000) begin
      for (int i = 0; i < 8; i++) in_cells[i] = $urandom & 32'h7;
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
