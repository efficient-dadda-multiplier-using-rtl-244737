// approx_dadda_mult: unsigned N x N Dadda multiplier with approximate 4:2
// compressors in its low columns and an error-correction module.
//
// The multiplier works in three phases:
//  1. Partial products: an AND array makes the N*N bits a[i]&b[j], with
//     weight 2^(i+j).
//  2. Reduction: 4:2 compressors reduce the heap level by level to two rows
//     (8 -> 4 -> 2 rows for N = 8). Full and half adders cover what a
//     compressor cannot. The NA lowest columns (the approximate region) use
//     approx_compressor_42. The other columns use exact_compressor_42, whose
//     couts chain into the carry-ins of the next column.
//  3. Final accumulation: final_adder, a ripple-carry adder, adds the rows.
//
// Error correction (ECM = 1): each approximate compressor in column NA-1 gets
// an error_correction_module. That AND gate flags Q3 = Q4 = 1, the pattern
// behind the compressor's low-reading cases, and drives the free carry-in of
// an exact compressor in column NA of the same level. For N = 8, NA = 8 that
// is two gates in the first level and one in the second.
// CORR is an optional constant correction term: its set bits are added to
// the heap as constant ones (two's complement for a negative correction; the
// product is taken modulo 2^(2N)).
//
// The cells and their wiring come from dadda_plan_pkg::plan_query, evaluated
// at elaboration, so N, NA, ECM and CORR may be changed freely.
// Outputs: p is the (approximate) product. ecm_hit is high when any
// error-correction gate fires; it is an observation output and feeds nothing
// in the datapath. Purely combinational: no clock, no latency.
//
// Follows the published design: the compressor truth table, the 4:2
// two-level Dadda reduction, the AND-gate correction terms as carry-ins of
// exact compressors, the 8x8 main size and the ripple final adder.
// This design's own choices: the cell placement rule in the package, the
// default NA = 8 (the only value that gives the published count of 2 + 1
// correction gates), the correction weight (column NA) and CORR = 0.
module approx_dadda_mult
  import dadda_plan_pkg::*;
#(
  parameter int unsigned N    = 8,      // operand width
  parameter int unsigned NA   = 8,      // columns in the approximate region
  parameter bit          ECM  = 1'b1,   // error-correction module on/off
  parameter logic [63:0] CORR = '0      // constant correction term (mod 2^(2N))
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic           ecm_hit
);
  localparam int W      = 2 * N;
  localparam int NCELL  = plan_query(N, NA, ECM, CORR, Q_NCELL, 0, 0);
  localparam int NNODE  = plan_query(N, NA, ECM, CORR, Q_NNODE, 0, 0);
  localparam int NECM   = plan_query(N, NA, ECM, CORR, Q_NECM, 0, 0);
  localparam int ONE_N  = N * N;
  localparam int ZERO_N = N * N + 1;

  // Every bit of the heap, from partial products to the final two rows.
  wire logic node [NNODE];

  // Phase 1: partial products.
  for (genvar i = 0; i < N; i++) begin : g_pp_i
    for (genvar j = 0; j < N; j++) begin : g_pp_j
      assign node[i*N + j] = a[i] & b[j];
    end
  end
  assign node[ONE_N]  = 1'b1;
  assign node[ZERO_N] = 1'b0;

  // Phase 2: reduction cells.
  for (genvar k = 0; k < NCELL; k++) begin : g_cell
    localparam int TYP = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_TYPE);
    localparam int I0  = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_IN0);
    localparam int I1  = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_IN0 + 1);
    localparam int I2  = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_IN0 + 2);
    localparam int I3  = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_IN0 + 3);
    localparam int I4  = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_IN0 + 4);
    localparam int O0  = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_OUT0);
    localparam int O1  = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_OUT0 + 1);
    localparam int O2  = plan_query(N, NA, ECM, CORR, Q_CELL, k, F_OUT0 + 2);

    if (TYP == CELL_APPROX) begin : g_approx
      approx_compressor_42 u_cmp (
        .q    ({node[I3], node[I2], node[I1], node[I0]}),
        .sum  (node[O0]),
        .carry(node[O1])
      );
    end else if (TYP == CELL_EXACT) begin : g_exact
      exact_compressor_42 u_cmp (
        .x    ({node[I3], node[I2], node[I1], node[I0]}),
        .cin  (node[I4]),
        .sum  (node[O0]),
        .carry(node[O1]),
        .cout (node[O2])
      );
    end else if (TYP == CELL_ECM) begin : g_ecm
      error_correction_module u_ecm (
        .q3 (node[I0]),
        .q4 (node[I1]),
        .err(node[O0])
      );
    end else if (TYP == CELL_FA) begin : g_fa
      full_adder u_fa (
        .a(node[I0]), .b(node[I1]), .c(node[I2]),
        .sum(node[O0]), .carry(node[O1])
      );
    end else begin : g_ha
      half_adder u_ha (
        .a(node[I0]), .b(node[I1]),
        .sum(node[O0]), .carry(node[O1])
      );
    end
  end

  // Phase 3: final accumulation of the two remaining rows.
  logic [W-1:0] row0, row1;
  for (genvar c = 0; c < W; c++) begin : g_row
    localparam int R0 = plan_query(N, NA, ECM, CORR, Q_ROW, c, 0);
    localparam int R1 = plan_query(N, NA, ECM, CORR, Q_ROW, c, 1);
    assign row0[c] = node[R0];
    assign row1[c] = node[R1];
  end

  final_adder #(.W(W)) u_final (.a(row0), .b(row1), .s(p));

  // Observation: does any error-correction gate fire?
  if (NECM > 0) begin : g_hit
    logic [NECM-1:0] flags;
    for (genvar e = 0; e < NECM; e++) begin : g_flag
      localparam int EN = plan_query(N, NA, ECM, CORR, Q_ECM, e, 0);
      assign flags[e] = node[EN];
    end
    assign ecm_hit = |flags;
  end else begin : g_nohit
    assign ecm_hit = 1'b0;
  end
endmodule
