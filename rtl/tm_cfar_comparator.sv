// Detection comparator of the TM-CFAR processor.
//
// Q is high when the cell under test (port A, "in1") strictly exceeds the
// adaptive threshold (port B, "in2"), both taken as unsigned. The rule and the
// ports follow the published design; the strict ">" follows its wording
// ("exceeds").
//
// Timing: purely combinational.
module tm_cfar_comparator
  import tm_cfar_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] a,   // cell under test
  input  logic [WIDTH-1:0] b,   // adaptive threshold
  output logic             q    // detection decision
);

  assign q = a > b;

endmodule
