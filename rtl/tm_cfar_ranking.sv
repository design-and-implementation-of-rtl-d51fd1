// Ranking component of the TM-CFAR processor: sorts the 8 reference cells.
//
// The cells arrive as two halves, in_cells[0..3] from the leading part of the
// window and in_cells[4..7] from the lagging part. The network is built from
// 21 compare-exchange cells (tm_cfar_cmp_swap), the count of the published
// design:
//   * each half is sorted by a 4-input bubble network of 6 cells
//     (pairs 0-1, 1-2, 2-3, 0-1, 1-2, 0-1), 12 cells in all;
//   * the two sorted halves are merged by Batcher's odd-even merge of 9 cells
//     (0-4, 1-5, 2-6, 3-7, 2-4, 3-5, 1-2, 3-4, 5-6).
// The arrangement of the 21 cells is this implementation's own: only their
// number, the 8-in/8-out interface and the ascending order are published.
// out_sorted[0] is the smallest cell X(1), out_sorted[7] the largest X(8).
//
// Timing: purely combinational. A simulation assertion checks that the
// outputs come out in ascending order.
module tm_cfar_ranking
  import tm_cfar_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] in_cells   [8],
  output logic [WIDTH-1:0] out_sorted [8]
);

  localparam int unsigned N_CELLS = 21;

  // Lane pairs of the compare-exchange cells, in the order they are applied.
  localparam int unsigned LO [N_CELLS] = '{
    0, 1, 2, 0, 1, 0,            // bubble sort, leading half
    4, 5, 6, 4, 5, 4,            // bubble sort, lagging half
    0, 1, 2, 3, 2, 3, 1, 3, 5    // odd-even merge
  };
  localparam int unsigned HI [N_CELLS] = '{
    1, 2, 3, 1, 2, 1,
    5, 6, 7, 5, 6, 5,
    4, 5, 6, 7, 4, 5, 2, 4, 6
  };

  // Each generate block g_cell[k] holds the lanes after cell k; lanes that
  // cell k does not touch pass through unchanged.
  for (genvar k = 0; k < int'(N_CELLS); k++) begin : g_cell
    logic [WIDTH-1:0] cur [8];   // lanes before cell k
    logic [WIDTH-1:0] nxt [8];   // lanes after cell k
    logic [WIDTH-1:0] lo_out, hi_out;

    if (k == 0) begin : g_first
      assign cur = in_cells;
    end else begin : g_chain
      assign cur = g_cell[k-1].nxt;
    end

    tm_cfar_cmp_swap #(.WIDTH(WIDTH)) u_cmp_swap (
      .in1  (cur[LO[k]]),
      .in2  (cur[HI[k]]),
      .out1 (lo_out),
      .out2 (hi_out)
    );

    for (genvar l = 0; l < 8; l++) begin : g_lane
      if (l == LO[k]) begin : g_lo
        assign nxt[l] = lo_out;
      end else if (l == HI[k]) begin : g_hi
        assign nxt[l] = hi_out;
      end else begin : g_pass
        assign nxt[l] = cur[l];
      end
    end
  end

  assign out_sorted = g_cell[N_CELLS-1].nxt;

  // The network must leave its lanes in ascending order.
  always_comb begin
    for (int l = 1; l < 8; l++) begin
      assert (out_sorted[l-1] <= out_sorted[l])
        else $error("tm_cfar_ranking: lanes %0d and %0d out of order", l - 1, l);
    end
  end

endmodule
