// lev_pe: one processing element of the systolic Levenshtein array.
//
// PE number IDX (counting from 0) owns row IDX+1 of the Levenshtein matrix,
// i.e. pattern character pat_char. The array advances one anti-diagonal per
// clock: on the cycle where the shared wavefront counter `t` has the value
// t, this PE computes column j = t - IDX + 1 (when 1 <= j <= N):
//
//   r[j] = min(up + 1, left + 1, diag + cost)
//   up   = prev_row[j]    (row above, written by the previous PE at t-1)
//   left = r[j-1]         (this row, written by this PE at t-1)
//   diag = prev_row[j-1]
//   cost = 0 when window[j-1] equals pat_char, else 1 (character comparison)
//
// The window character is picked by a multiplexer driven by the column
// index, and each result is kept in the row register array r[0..N], whose
// entry 0 is the matrix border value IDX+1. The whole row is an output so
// the next PE (and, for the last PE, the result logic) can read it.
// The comparator, multiplexer, min/add and row registers follow the PE
// drawing of the ISMatch paper; the use of a shared wavefront counter as the
// control signal is this design's choice. Results are registered: a value
// computed while `en` is high at cycle t is visible from cycle t+1.
module lev_pe
  import ismatch_pkg::*;
#(
  parameter int unsigned N     = 8,                 // window = pattern length
  parameter int unsigned IDX   = 0,                 // row index - 1
  parameter int unsigned VAL_W = $clog2(N + 2),     // matrix value width
  parameter int unsigned T_W   = $clog2(2 * N)      // wavefront counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,              // wavefront running
  input  logic [T_W-1:0]   t,               // current anti-diagonal, 0..2N-2
  input  char_t            window [N],      // window characters s_1..s_N
  input  char_t            pat_char,        // pattern character p_{IDX+1}
  input  logic [VAL_W-1:0] prev_row [N+1],  // row IDX of the matrix
  output logic [VAL_W-1:0] row      [N+1]   // row IDX+1 of the matrix
);

  logic [VAL_W-1:0] r [N+1];

  // Column handled in this cycle, and whether it lies inside the matrix.
  logic signed [T_W+1:0] j_s;
  logic                  active;
  logic [T_W-1:0]        j;

  always_comb begin
    j_s    = $signed({2'b00, t}) - $signed((T_W+2)'(IDX)) + (T_W+2)'(1);
    active = en && (j_s >= 1) && (j_s <= $signed((T_W+2)'(N)));
    j      = active ? T_W'(j_s) : T_W'(1);
  end

  // Character comparison, min and add.
  logic             cost;
  logic [VAL_W-1:0] up_v, left_v, diag_v, sum_d, sum_u, sum_l, cell_v;

  always_comb begin
    cost   = (window[j-1] != pat_char);
    up_v   = prev_row[j];
    left_v = r[j-1];
    diag_v = prev_row[j-1];
    sum_d  = diag_v + VAL_W'(cost);
    sum_u  = up_v + VAL_W'(1);
    sum_l  = left_v + VAL_W'(1);
    cell_v   = sum_d;
    if (sum_u < cell_v) cell_v = sum_u;
    if (sum_l < cell_v) cell_v = sum_l;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= N; k++) r[k] <= VAL_W'(0);
      r[0] <= VAL_W'(IDX + 1);
    end else if (active) begin
      r[j] <= cell_v;
    end
  end

  assign row = r;

endmodule
