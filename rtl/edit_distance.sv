// edit_distance: systolic Levenshtein distance array for one pattern.
//
// N processing elements (lev_pe), one per pattern character, compute the
// (N+1)x(N+1) Levenshtein matrix between the stored pattern and an N-character
// text window, one anti-diagonal per clock (the wavefront), so the matrix is
// complete after |p| + |s| - 1 = 2N-1 compute cycles. The last row of the
// matrix holds the distance between the whole pattern and every prefix of
// the window, so substring matches come for free: the result is the smallest
// value of that row, and the occurrence length is the first column where it
// occurs. `hit` is raised when that distance is not above `threshold`.
//
// Timing: `start` (accepted while `ready`) latches the window and its text
// index in one cycle, 2N-1 wavefront cycles follow, and one cycle reduces the
// last row to the result. `done` pulses for one cycle 2N+1 cycles after the
// start cycle (17 cycles for N = 8) with hit/occ valid in that cycle; a new
// `start` may be given in the cycle before `done` so runs follow back to back.
//
// The array structure and the 2N-1 wavefront latency follow the ISMatch paper.
// Distances and lengths never exceed N, so the upper bits of the 16-bit
// result fields are always zero; the fields keep the ISMatch paper's widths.
// The load and reduce cycles, the tie rule (shortest prefix wins) and the
// "not above threshold" comparison are this design's choices.
module edit_distance
  import ismatch_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned VAL_W = $clog2(N + 2),
  parameter int unsigned T_W   = $clog2(2 * N)
) (
  input  logic              clk,
  input  logic              rst_n,
  // pattern register
  input  logic              pat_we,
  input  char_t             pat_in    [N],
  // window to compare
  input  logic              start,
  output logic              ready,
  input  char_t             window_in [N],
  input  logic [IDX_W-1:0]  index_in,
  input  logic [DIST_W-1:0] threshold,
  // result
  output logic              done,
  output logic              hit,
  output occ_t              occ
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_RED} state_t;
  state_t state;

  char_t            pattern [N];
  char_t            window  [N];
  logic [IDX_W-1:0] index_q;
  logic [T_W-1:0]   t;

  // rows[0] is the top border of the matrix; rows[i+1] is PE i's row.
  logic [VAL_W-1:0] rows [N+1][N+1];

  for (genvar c = 0; c <= N; c++) begin : g_border
    assign rows[0][c] = VAL_W'(c);
  end

  for (genvar i = 0; i < N; i++) begin : g_pe
    lev_pe #(.N(N), .IDX(i), .VAL_W(VAL_W), .T_W(T_W)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (state == S_RUN),
      .t        (t),
      .window   (window),
      .pat_char (pattern[i]),
      .prev_row (rows[i]),
      .row      (rows[i+1])
    );
  end

  assign ready = (state != S_RUN);

  // Reduction of the last row: smallest distance, first column reaching it.
  logic [VAL_W-1:0] best_d;
  logic [LEN_W-1:0] best_len;

  always_comb begin
    best_d   = rows[N][1];
    best_len = LEN_W'(1);
    for (int c = 2; c <= N; c++) begin
      if (rows[N][c] < best_d) begin
        best_d   = rows[N][c];
        best_len = LEN_W'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      t       <= '0;
      index_q <= '0;
      done    <= 1'b0;
      hit     <= 1'b0;
      occ     <= '0;
      for (int k = 0; k < N; k++) begin
        pattern[k] <= '0;
        window[k]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (pat_we) pattern <= pat_in;
      case (state)
        S_RUN: begin
          if (t == T_W'(2 * N - 2)) state <= S_RED;
          t <= t + T_W'(1);
        end
        S_RED: begin
          done          <= 1'b1;
          hit           <= (DIST_W'(best_d) <= threshold);
          occ.distance  <= DIST_W'(best_d);
          occ.len       <= best_len;
          occ.index     <= index_q;
          state         <= S_IDLE;
        end
        default: ;
      endcase
      if (start && ready) begin
        window  <= window_in;
        index_q <= index_in;
        t       <= '0;
        state   <= S_RUN;
      end
    end
  end

endmodule
