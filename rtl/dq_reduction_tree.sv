// dq_reduction_tree: partial-product reduction with dual-quality 5:2
// compressors.
//
// The N partial-product rows (2N bits each) are reduced level by level with
// comp52_row until two rows remain; the schedule is in dq_mult_pkg (rows are
// taken five at a time, left-overs pass to the next level, as late as
// possible in the Dadda manner). For N = 8 there are two compressor levels:
// rows 0-4 are compressed and rows 5-7 pass (8 -> 5), then the five rows are
// compressed to two. For N = 16: 16 -> 7 -> 4 -> 2; N = 32: 32 -> 14 -> 8
// -> 5 -> 2. The reduction to two rows with 5:2 compressors follows the
// multiplier description; the exact grouping is this design's own choice.
//
// Rows are full-width vectors; compressors that see only constant zeros are
// removed by synthesis. Combinational; exact selects the mode of every
// compressor column below APPROX_COLS.
module dq_reduction_tree
  import dq_mult_pkg::*;
#(
  parameter int unsigned N           = 8,
  parameter int unsigned APPROX_COLS = 8
) (
  input  logic [2*N-1:0] pp [N],
  input  logic           exact,
  output logic [2*N-1:0] row_a,
  output logic [2*N-1:0] row_b
);
  localparam int unsigned W  = 2 * N;
  localparam int unsigned LV = num_levels(N);

  // Each level owns its input rows (cur) and output rows (nxt); level l
  // reads the nxt rows of level l-1, level 0 reads the partial products.
  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int unsigned R  = rows_at(N, l);
    localparam int unsigned G  = groups_of(R);
    localparam int unsigned RN = next_rows(R);
    localparam int unsigned P  = RN - 2 * G;   // rows passed on unchanged

    logic [W-1:0] cur [R];
    logic [W-1:0] nxt [RN];

    for (genvar i = 0; i < R; i++) begin : g_cur
      if (l == 0) begin : g_pp
        assign cur[i] = pp[i];
      end else begin : g_prev
        assign cur[i] = g_lvl[l-1].nxt[i];
      end
    end

    for (genvar g = 0; g < G; g++) begin : g_grp
      logic [W-1:0] grp [5];
      for (genvar k = 0; k < 5; k++) begin : g_pick
        if (5 * g + k < R) begin : g_row
          assign grp[k] = cur[5*g+k];
        end else begin : g_pad
          assign grp[k] = '0;
        end
      end
      comp52_row #(.W(W), .APPROX_COLS(APPROX_COLS)) u_row (
        .rows      (grp),
        .exact     (exact),
        .sum_row   (nxt[2*g]),
        .carry_row (nxt[2*g+1])
      );
    end

    for (genvar q = 0; q < P; q++) begin : g_pass
      assign nxt[2*G+q] = cur[5*G+q];
    end
  end

  if (LV == 0) begin : g_none
    // One or two partial-product rows: nothing to compress.
    assign row_a = pp[0];
    if (N >= 2) begin : g_two
      assign row_b = pp[1];
    end else begin : g_one
      assign row_b = '0;
    end
  end else begin : g_out
    assign row_a = g_lvl[LV-1].nxt[0];
    assign row_b = g_lvl[LV-1].nxt[1];
  end
endmodule
