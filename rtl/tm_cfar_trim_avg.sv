// Trimming and average component of the TM-CFAR processor.
//
// Receives the N_KEEP (6) ordered reference cells that remain once the T1
// smallest and T2 largest have been dropped (the drop is done by wiring: the
// top connects only sorted cells X(T1+1)..X(N-T2) to this block). It adds
// them into the noise estimate Z of the trimmed-mean rule and outputs the
// average aver = floor(Z / N_KEEP). The sum is formed at full width
// (WIDTH + clog2(N_KEEP) bits) so it cannot overflow; the average of values
// that fit in WIDTH bits also fits in WIDTH bits. The averaging itself is
// published; rounding down by integer division by a constant is this
// implementation's choice.
//
// Timing: purely combinational.
module tm_cfar_trim_avg
  import tm_cfar_pkg::*;
#(
  parameter int unsigned WIDTH  = DATA_W,
  parameter int unsigned N_IN   = N_KEEP
) (
  input  logic [WIDTH-1:0] z    [N_IN],
  output logic [WIDTH-1:0] aver
);

  localparam int unsigned SUM_W = WIDTH + $clog2(N_IN + 1);

  logic [SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < int'(N_IN); i++) sum += SUM_W'(z[i]);
    aver = WIDTH'(sum / SUM_W'(N_IN));
  end

endmodule
