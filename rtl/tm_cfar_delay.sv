// Tapped delay line of the TM-CFAR processor.
//
// A chain of N_TAPS registers (4 leading reference cells, the cell under test
// and 4 lagging reference cells in the default configuration). Each clock edge
// on which `start` is high shifts the new sample `si` into tap 0 and moves
// every other tap one place along; with `start` low the line holds. All taps
// are visible in parallel on `par_out`, tap CUT_TAP (4) being the cell under
// test. The ports si, start, clk and par_out<0..8> follow the published
// component; the meaning of `start` as a per-sample shift enable and the
// synchronous active-low reset that clears the line to zero are this
// implementation's choices.
//
// Timing: par_out changes one clock after a cycle with start high.
module tm_cfar_delay
  import tm_cfar_pkg::*;
#(
  parameter int unsigned WIDTH  = DATA_W,
  parameter int unsigned N_TAPS_P = N_TAPS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] si,
  output logic [WIDTH-1:0] par_out [N_TAPS_P]
);

  logic [WIDTH-1:0] taps [N_TAPS_P];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_TAPS_P); i++) taps[i] <= '0;
    end else if (start) begin
      taps[0] <= si;
      for (int i = 1; i < int'(N_TAPS_P); i++) taps[i] <= taps[i-1];
    end
  end

  assign par_out = taps;

endmodule
