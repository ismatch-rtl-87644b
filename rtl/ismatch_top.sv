// ismatch_top: inexact string matching accelerator.
//
// The host streams a long text (e.g. a DNA sequence) into DRAM, one
// character per 32-bit word, and loads up to P patterns of N characters.
// The accelerator slides an N-character window over the text one character
// at a time. For every window position each of the P pattern engines
// computes, in a systolic array of N processing elements, the Levenshtein
// distance between its pattern and every prefix of the window; a distance
// not above `threshold` is a hit. Each engine's validation scheme (K+1
// priority levels) removes duplicate hits and hits that are part of a
// better or longer occurrence, and the data writing block stores every
// validated occurrence in DRAM as two 32-bit words ({length, distance},
// index).
//
// Structure: one text_window (shared, so all engines see the same data),
// P edit_distance arrays running in lockstep, P validation schemes, one
// data_writer and the step controller below.
//
// Step controller: after `start` it clears the window and the writer, then
// launches a window comparison whenever the window is full, the arrays are
// ready and the writer has room; the launch also slides the window. Each
// array result is one validation step. After the last window (the one ending
// at text_len) it keeps stepping the validation schemes with no hits (flush)
// until none is busy, waits for the writer to empty and raises `done`.
// A window takes 2N+1 cycles from launch to result; launches follow every
// 2N cycles when data is available.
//
// Host interface (plain registers): pat_we writes pattern pat_sel; threshold,
// text_base, text_len, result_base are sampled while running; chars_avail may
// grow during the run (real-time streaming), the window waits for it.
// n_results counts stored occurrences.
//
// The dataflow (DRAM -> window -> distance -> validation -> writer -> DRAM),
// the parallel pattern engines and the record format follow the ISMatch paper;
// the controller, flush phase and host register interface are this design's
// own. P = 4 is an assumed default; N = 8 and K = 2 are the ISMatch paper's
// configuration.
module ismatch_top
  import ismatch_pkg::*;
#(
  parameter int unsigned N          = 8,   // pattern and window length
  parameter int unsigned P          = 4,   // pattern engines in parallel
  parameter int unsigned K          = 2,   // validation levels 0..K
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SEL_W      = (P > 1) ? $clog2(P) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host configuration and control
  input  logic              pat_we,
  input  logic [SEL_W-1:0]  pat_sel,
  input  char_t             pat_in [N],
  input  logic [DIST_W-1:0] threshold,
  input  logic [31:0]       text_base,
  input  logic [31:0]       text_len,
  input  logic [31:0]       chars_avail,
  input  logic [31:0]       result_base,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [31:0]       n_results,
  output logic              waiting_text,  // window waits for chars_avail
  // DRAM read port (text)
  output logic              rd_req,
  output logic [31:0]       rd_addr,
  input  logic              rd_valid,
  input  word_t             rd_data,
  // DRAM write port (results)
  output logic              wr_req,
  output logic [31:0]       wr_addr,
  output word_t             wr_data,
  input  logic              wr_ready
);

  typedef enum logic [2:0] {C_IDLE, C_CLEAR, C_RUN, C_FLUSH, C_DRAIN, C_DONE} cstate_t;
  cstate_t cs;

  logic clear;
  assign clear = (cs == C_CLEAR);

  // ---------------------------------------------------------------- window
  char_t            window [N];
  logic [IDX_W-1:0] win_index;
  logic             win_full, win_last, shift, stall_data;

  text_window #(.N(N)) u_window (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (clear),
    .text_base   (text_base),
    .text_len    (text_len),
    .chars_avail (chars_avail),
    .rd_req      (rd_req),
    .rd_addr     (rd_addr),
    .rd_valid    (rd_valid),
    .rd_data     (rd_data),
    .window      (window),
    .win_index   (win_index),
    .win_full    (win_full),
    .last        (win_last),
    .shift       (shift),
    .stall_data  (stall_data)
  );

  // ------------------------------------------------------- pattern engines
  logic [P-1:0] ed_ready, ed_done, ed_hit, v_busy, v_valid;
  occ_t         ed_occ  [P];
  logic         v_valid_a [P];
  occ_t         v_occ   [P];
  logic         launch, step, flush_step, launched_last;
  logic [1:0]   inflight;   // launched windows whose result is still due

  for (genvar e = 0; e < P; e++) begin : g_eng
    edit_distance #(.N(N)) u_dist (
      .clk       (clk),
      .rst_n     (rst_n),
      .pat_we    (pat_we && (pat_sel == SEL_W'(e))),
      .pat_in    (pat_in),
      .start     (launch),
      .ready     (ed_ready[e]),
      .window_in (window),
      .index_in  (win_index),
      .threshold (threshold),
      .done      (ed_done[e]),
      .hit       (ed_hit[e]),
      .occ       (ed_occ[e])
    );

    validation #(.K(K)) u_val (
      .clk      (clk),
      .rst_n    (rst_n),
      .step     (step),
      .hit      (ed_hit[e] && !flush_step),
      .occ_in   (ed_occ[e]),
      .valid    (v_valid[e]),
      .occ_out  (v_occ[e]),
      .busy_any (v_busy[e]),
      .discard  (),
      .drop     ()
    );

    assign v_valid_a[e] = v_valid[e];
  end

  // ----------------------------------------------------------- data writer
  logic space_low, wr_idle;

  data_writer #(.P(P), .FIFO_DEPTH(FIFO_DEPTH)) u_writer (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (clear),
    .result_base (result_base),
    .in_valid    (v_valid_a),
    .in_occ      (v_occ),
    .space_low   (space_low),
    .wr_req      (wr_req),
    .wr_addr     (wr_addr),
    .wr_data     (wr_data),
    .wr_ready    (wr_ready),
    .n_written   (n_results),
    .idle        (wr_idle)
  );

  // ------------------------------------------------------- step controller
  always_comb begin
    launch     = (cs == C_RUN) && !launched_last && win_full && ed_ready[0] && !space_low;
    shift      = launch;
    flush_step = (cs == C_FLUSH) && (|v_busy) && !space_low;
    step       = ((cs == C_RUN) && ed_done[0]) || flush_step;
  end

  assign waiting_text = stall_data;
  assign busy = (cs != C_IDLE) && (cs != C_DONE);
  assign done = (cs == C_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs            <= C_IDLE;
      launched_last <= 1'b0;
      inflight      <= '0;
    end else begin
      inflight <= inflight + 2'(launch) - 2'(ed_done[0]);
      case (cs)
        C_IDLE, C_DONE: if (start) cs <= C_CLEAR;
        C_CLEAR: begin
          launched_last <= 1'b0;
          cs            <= (text_len < 32'(N)) ? C_FLUSH : C_RUN;
        end
        C_RUN: begin
          if (launch && win_last) launched_last <= 1'b1;
          if (launched_last && inflight == '0) cs <= C_FLUSH;
        end
        C_FLUSH: if (!(|v_busy) && !(|v_valid)) cs <= C_DRAIN;
        C_DRAIN: if (wr_idle && !(|v_valid)) cs <= C_DONE;
        default: cs <= C_IDLE;
      endcase
    end
  end

  // The engines run in lockstep.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (ed_done == '0) || (ed_done == '1));

endmodule
