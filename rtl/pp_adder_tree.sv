// pp_adder_tree: partial-product adder array of the filter.
//
// Adds the N_IN partial products of all taps (3 per tap, 54 for 18 taps) down to one sum
// row and one carry row, to be added by the final adder. Each level groups its rows in
// fours and passes every group through a 4:2 compressor (comp42); three leftover rows go
// through one more compressor with its fourth input zero, one or two leftover rows skip
// the level. For 54 rows the levels hold 54, 28, 14, 8, 4 and 2 rows: five compressor
// levels, each two full adders deep. All arithmetic is modulo 2^W, so a partial sum may
// wrap as long as the final result fits the word.
// Combinational; the row counts come from csd_pkg::tree_rows_at at elaboration time.
// The tree of 4:2 compressors follows the published design; the handling of leftover rows is this
// design's choice.
module pp_adder_tree
  import csd_pkg::*;
#(
  parameter int unsigned W    = DATA_W + GUARD,     // row width
  parameter int unsigned N_IN = TAPS * PP_PER_TAP   // number of partial products
) (
  input  logic [W-1:0] pp [N_IN],  // partial products
  output logic [W-1:0] sum,        // sum row
  output logic [W-1:0] carry       // carry row
);

  localparam int unsigned LEVELS = tree_levels(N_IN);

  // Each level reads the rows of the level before it (the partial products for level 0)
  // and drives its own output rows.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned R_IN  = tree_rows_at(N_IN, l);
    localparam int unsigned R_OUT = tree_next_rows(R_IN);
    localparam int unsigned GRP   = R_IN / 4;
    localparam int unsigned REST  = R_IN % 4;

    logic [W-1:0] in_rows  [R_IN];
    logic [W-1:0] out_rows [R_OUT];

    if (l == 0) begin : g_first
      assign in_rows = pp;
    end else begin : g_next
      assign in_rows = g_level[l-1].out_rows;
    end

    for (genvar g = 0; g < GRP; g++) begin : g_grp
      comp42 #(.W(W)) u_c42 (
        .a     (in_rows[4*g]),
        .b     (in_rows[4*g+1]),
        .c     (in_rows[4*g+2]),
        .d     (in_rows[4*g+3]),
        .sum   (out_rows[2*g]),
        .carry (out_rows[2*g+1])
      );
    end

    if (REST == 3) begin : g_rest3
      comp42 #(.W(W)) u_c42 (
        .a     (in_rows[4*GRP]),
        .b     (in_rows[4*GRP+1]),
        .c     (in_rows[4*GRP+2]),
        .d     ('0),
        .sum   (out_rows[2*GRP]),
        .carry (out_rows[2*GRP+1])
      );
    end else begin : g_pass
      for (genvar k = 0; k < REST; k++) begin : g_row
        assign out_rows[2*GRP+k] = in_rows[4*GRP+k];
      end
    end
  end

  if (LEVELS == 0 && N_IN == 1) begin : g_one
    assign sum   = pp[0];
    assign carry = '0;
  end else if (LEVELS == 0) begin : g_two
    assign sum   = pp[0];
    assign carry = pp[1];
  end else begin : g_tree
    assign sum   = g_level[LEVELS-1].out_rows[0];
    assign carry = g_level[LEVELS-1].out_rows[1];
  end

endmodule
