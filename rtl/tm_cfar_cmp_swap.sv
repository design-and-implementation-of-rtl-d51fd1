// Compare-exchange cell, the building block of the ranking network.
//
// out1 receives the smaller and out2 the larger of the two unsigned inputs;
// equal inputs pass straight through. The cell is purely combinational, so a
// chain of them forms a sorting network whose delay is one magnitude
// comparison plus one 2:1 multiplexer per layer. The port names follow the
// published subcomponent (in1, in2, out1, out2); which output carries the
// minimum is this implementation's choice, made so that the network sorts in
// ascending order as the ranking step requires.
module tm_cfar_cmp_swap #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic [WIDTH-1:0] out1,  // min(in1, in2)
  output logic [WIDTH-1:0] out2   // max(in1, in2)
);

  logic swap;

  always_comb begin
    swap = in1 > in2;
    out1 = swap ? in2 : in1;
    out2 = swap ? in1 : in2;
  end

endmodule
