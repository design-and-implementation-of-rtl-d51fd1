// Adaptive threshold component of the TM-CFAR processor.
//
// Multiplies the trimmed average (port A, "input") by the scale factor T
// (port B, "threshold") and registers the product on the clock (port C) to
// give the adaptive threshold Tz (port P, "output"). The registered multiplier
// and its three data ports are published. This implementation's choices:
// T is an unsigned fixed-point number with FRAC_BITS fraction bits (0 by
// default, so T is a plain integer), the full product is shifted right by
// FRAC_BITS (rounding down), and a result that does not fit in WIDTH bits
// saturates to all ones, so an overflowing threshold can never raise a false
// detection.
//
// Timing: one clock of latency, no enable (the product is registered on every
// rising edge).
module tm_cfar_threshold
  import tm_cfar_pkg::*;
#(
  parameter int unsigned WIDTH     = DATA_W,
  parameter int unsigned FRAC_BITS = 0
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,   // trimmed average
  input  logic [WIDTH-1:0] b,   // scale factor T
  output logic [WIDTH-1:0] p    // adaptive threshold Tz
);

  logic [2*WIDTH-1:0] product;
  logic [2*WIDTH-1:0] scaled;
  logic [WIDTH-1:0]   tz;

  always_comb begin
    product = (2*WIDTH)'(a) * (2*WIDTH)'(b);
    scaled  = product >> FRAC_BITS;
    if (scaled[2*WIDTH-1:WIDTH] != '0) tz = '1;
    else                               tz = scaled[WIDTH-1:0];
  end

  always_ff @(posedge clk) p <= tz;

endmodule
