// TM-CFAR (trimmed-mean constant false alarm rate) radar detector.
//
// Square-law detected range samples enter one per clock on `si` while `start`
// is high. For every new sample the processor decides whether the cell in the
// middle of a 9-cell sliding window (the cell under test, CUT) holds a target:
//
//   delay line  -> 4 leading + CUT + 4 lagging cells, all in parallel
//   ranking     -> the 8 reference cells sorted ascending, X(1)..X(8)
//   trimming    -> X(1..T1) and X(N-T2+1..N) dropped (T1 = T2 = 1 by default)
//   average     -> aver = (X(T1+1) + ... + X(N-T2)) / (N - T1 - T2)
//   threshold   -> Tz = aver * T, T being the scale factor on `threshold`
//   comparator  -> TM_out = CUT > Tz
//
// The chain of five components, their port widths and the default trimming
// (two of the eight reference cells removed, six averaged) follow the
// published architecture. Choices of this implementation: a synchronous
// active-low reset, `start` read as a per-sample shift enable, the `tm_valid`
// output, a one-clock register that delays the CUT so that it meets the
// registered threshold, and the fixed-point format of T (see
// tm_cfar_threshold). Setting T1_TRIM = T2_TRIM = 0 turns the detector into a
// cell-averaging CFAR; other trims give the ordered-statistic family.
//
// Timing: one sample per clock. A sample shifted in at rising edge k moves the
// window; its decision is on TM_out, with tm_valid high, for the one cycle
// after edge k+1. tm_valid stays low until the window has been filled with
// 9 samples after reset; an assertion checks that tm_valid never rises
// with a partly filled window.
module tm_cfar_top
  import tm_cfar_pkg::*;
#(
  parameter int unsigned WIDTH     = DATA_W,
  parameter int unsigned T1_TRIM   = T1,
  parameter int unsigned T2_TRIM   = T2,
  parameter int unsigned FRAC_BITS = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,      // shift enable: si holds a new sample
  input  logic [WIDTH-1:0] si,         // detected range sample
  input  logic [WIDTH-1:0] threshold,  // scale factor T
  output logic             TM_out,     // detection decision
  output logic             tm_valid    // TM_out belongs to a new full window
);

  localparam int unsigned KEEP = N_REF - T1_TRIM - T2_TRIM;

  initial begin
    assert (T1_TRIM + T2_TRIM < N_REF)
      else $fatal(1, "tm_cfar_top: trimming leaves no reference cells");
  end

  // ---------------------------------------------------------------- delay
  logic [WIDTH-1:0] par_out [N_TAPS];

  tm_cfar_delay #(.WIDTH(WIDTH), .N_TAPS_P(N_TAPS)) u_delay (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .si      (si),
    .par_out (par_out)
  );

  // -------------------------------------------------------------- ranking
  logic [WIDTH-1:0] ref_cells [N_REF];
  logic [WIDTH-1:0] sorted    [N_REF];

  for (genvar i = 0; i < int'(N_REF); i++) begin : g_ref
    if (i < int'(CUT_TAP)) begin : g_lead
      assign ref_cells[i] = par_out[i];
    end else begin : g_lag
      assign ref_cells[i] = par_out[i+1];
    end
  end

  tm_cfar_ranking #(.WIDTH(WIDTH)) u_ranking (
    .in_cells   (ref_cells),
    .out_sorted (sorted)
  );

  // ---------------------------------------------------- trimming, average
  logic [WIDTH-1:0] kept [KEEP];
  logic [WIDTH-1:0] aver;

  for (genvar i = 0; i < int'(KEEP); i++) begin : g_keep
    assign kept[i] = sorted[T1_TRIM + i];
  end

  tm_cfar_trim_avg #(.WIDTH(WIDTH), .N_IN(KEEP)) u_trim_avg (
    .z    (kept),
    .aver (aver)
  );

  // --------------------------------------------------- adaptive threshold
  logic [WIDTH-1:0] tz;

  tm_cfar_threshold #(.WIDTH(WIDTH), .FRAC_BITS(FRAC_BITS)) u_threshold (
    .clk (clk),
    .a   (aver),
    .b   (threshold),
    .p   (tz)
  );

  // The CUT is delayed by one clock to line up with the registered Tz.
  logic [WIDTH-1:0] cut_q;

  always_ff @(posedge clk) cut_q <= par_out[CUT_TAP];

  // ------------------------------------------------------------ comparator
  tm_cfar_comparator #(.WIDTH(WIDTH)) u_comparator (
    .a (cut_q),
    .b (tz),
    .q (TM_out)
  );

  // ------------------------------------------------------- valid tracking
  // fill counts shifted samples up to N_TAPS; a shift that completes or moves
  // a full window produces one valid decision a clock later.
  localparam int unsigned FILL_W = $clog2(N_TAPS + 1);

  logic [FILL_W-1:0] fill;
  logic              shift_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill       <= '0;
      shift_full <= 1'b0;
      tm_valid   <= 1'b0;
    end else begin
      if (start && fill != FILL_W'(N_TAPS)) fill <= fill + 1'b1;
      shift_full <= start && (fill >= FILL_W'(N_TAPS - 1));
      tm_valid   <= shift_full;
    end
  end

  // A decision is only flagged valid once the whole window holds samples.
  assert property (@(posedge clk) disable iff (!rst_n) tm_valid |-> fill == FILL_W'(N_TAPS))
    else $error("tm_cfar_top: tm_valid with a partly filled window");

endmodule
