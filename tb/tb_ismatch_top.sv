// tb_ismatch_top: end-to-end test of the accelerator at its default size
// (8-character patterns and window, 4 pattern engines, distances 0..2).
//
// A random DNA text is placed in the DRAM model with exact and mutated
// copies of the patterns planted in it. The expected result list is
// computed independently: the Levenshtein distance of every window against
// every pattern (reference matrix), the hit rule, and the step-level
// validation model, followed by flush steps. Every record the accelerator
// writes to DRAM must be expected, and every expected record must be
// written.
//
// Three operations are run:
//   1. whole text already in DRAM, DRAM always ready: also checks the
//      window rate of one launch per 2N cycles;
//   2. text streamed in while the search runs and DRAM writes refused at
//      random, with threshold 1;
//   2b. densely planted copies with DRAM refusing most writes, so the
//      result FIFOs fill and the controller holds the next step;
//   3. a text shorter than the window (nothing to report).
// Each mechanism must happen at least once: hits, exact-count validation,
// late validation, substring discard, rejected hit, hits of several engines
// in the same step, waiting for text, write back-pressure, step hold-off
// because a result FIFO is nearly full, and the flush phase.
module tb_ismatch_top;
  import ismatch_pkg::*;
  import ismatch_ref_pkg::*;

  localparam int N = 8;
  localparam int P = 4;
  localparam int K = 2;
  localparam int TEXT_LEN = 600;
  localparam logic [31:0] TBASE = 32'h0000_0000;
  localparam logic [31:0] RBASE = 32'h0000_4000;

  logic clk = 0, rst_n = 0;
  logic pat_we = 0, start = 0;
  logic [1:0] pat_sel = '0;
  char_t pat_in [N];
  logic [DIST_W-1:0] threshold = 16'd2;
  logic [31:0] text_base = TBASE, text_len = TEXT_LEN, chars_avail = 0, result_base = RBASE;
  logic busy, done, waiting_text;
  logic [31:0] n_results;
  logic rd_req, rd_valid, wr_req, wr_ready;
  logic [31:0] rd_addr, wr_addr;
  word_t rd_data, wr_data;

  int checks = 0, failures = 0;
  longint cyc = 0;

  ismatch_top dut (.*);
  dram_model #(.WORDS(8192), .RD_LAT(2), .STALL_WR(0)) u_dram (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------- mechanism counters
  int c_hit = 0, c_multi = 0, c_valid = 0, c_late = 0, c_disc = 0, c_drop = 0;
  int c_wait = 0, c_hold = 0, c_flush = 0, c_launch = 0;

  for (genvar e = 0; e < P; e++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      if (dut.g_eng[e].u_val.discard) c_disc++;
      if (dut.g_eng[e].u_val.drop) c_drop++;
      if (dut.g_eng[e].u_val.valid) c_valid++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    int nh;
    nh = $countones(dut.ed_done & dut.ed_hit);
    c_hit += nh;
    if (nh > 1) c_multi++;
    if (waiting_text) c_wait++;
    if (dut.cs == dut.C_RUN && dut.win_full && dut.ed_ready[0] && !dut.launched_last
        && dut.space_low) c_hold++;
    if (dut.flush_step) c_flush++;
    if (dut.launch) c_launch++;
  end

  // -------------------------------------------------------- text and model
  byte unsigned text [TEXT_LEN];
  str_t pats [P];
  typedef struct { int d; int l; int i; } rec_t;
  rec_t exp_q [P][$];

  task automatic make_text(int len, int dens);
    for (int i = 0; i < len; i++) text[i] = dna($urandom);
    // plant exact and mutated copies of the patterns
    for (int c = 0; c < len / dens; c++) begin
      int at, e, muts;
      at = $urandom % (len - N);
      e = $urandom % P;
      muts = $urandom % 3;
      for (int k = 0; k < N; k++) text[at + k] = pats[e][k];
      for (int m = 0; m < muts; m++) text[at + $urandom % N] = dna($urandom);
    end
    // and one exact copy at the very end, so results are still pending
    // when the last window has been compared (flush phase)
    if (len >= 2 * N)
      for (int k = 0; k < N; k++) text[len - N + k] = pats[0][k];
    for (int i = 0; i < len; i++) u_dram.mem[(TBASE >> 2) + i] = {24'h0, text[i]};
  endtask

  task automatic model(int len, int thr, output int total, output int late);
    total = 0;
    late = 0;
    for (int e = 0; e < P; e++) begin
      val_model m;
      int od, ol, oi, nd, nr, s;
      m = new(K);
      exp_q[e].delete();
      s = 0;
      for (int w = 0; w + N <= len; w++) begin
        str_t win;
        int bd, bl;
        for (int k = 0; k < N; k++) win[k] = text[w + k];
        best_of_row(pats[e], win, N, bd, bl);
        if (m.step(bd <= thr, bd, bl, w, od, ol, oi, nd, nr)) begin
          exp_q[e].push_back('{od, ol, oi});
          if (s - oi > ol) late++;
        end
        s++;
      end
      while (m.any_busy()) begin
        if (m.step(0, 0, 0, 0, od, ol, oi, nd, nr)) begin
          exp_q[e].push_back('{od, ol, oi});
          if (s - oi > ol) late++;
        end
        s++;
      end
      total += exp_q[e].size();
    end
  endtask

  task automatic compare(int total);
    check("n_results", int'(n_results), total);
    for (int r = 0; r < int'(n_results); r++) begin
      logic [31:0] w0, w1;
      bit ok = 0;
      w0 = u_dram.mem[(RBASE >> 2) + 2 * r];
      w1 = u_dram.mem[(RBASE >> 2) + 2 * r + 1];
      for (int e = 0; e < P && !ok; e++)
        if (exp_q[e].size() > 0 && w0 == {16'(exp_q[e][0].l), 16'(exp_q[e][0].d)}
            && w1 == 32'(exp_q[e][0].i)) begin
          void'(exp_q[e].pop_front());
          ok = 1;
        end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL record %0d = %h %h not expected", r, w0, w1);
      end
    end
    for (int e = 0; e < P; e++) check("all expected records written", exp_q[e].size(), 0);
  endtask

  task automatic run(int len, int thr, bit stream, int wstall);
    int total, late;
    longint t0;
    model(len, thr, total, late);
    c_late += late;
    u_dram.stall_pct = wstall;
    for (int i = 0; i < 2 * total + 2; i++) u_dram.mem[(RBASE >> 2) + i] = '0;
    @(negedge clk);
    text_len = len;
    threshold = DIST_W'(thr);
    chars_avail = stream ? 0 : len;
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      if (stream && chars_avail < len && $urandom % 8 == 0) chars_avail++;
    end
    if (!stream && !wstall && len >= N)
      check("window rate within 2N cycles per window", int'(cyc - t0 <= longint'(2 * N * (len - N + 1) + 60)), 1);
    $display("run len=%0d thr=%0d: %0d records expected, %0d written, %0d cycles",
             len, thr, total, n_results, cyc - t0);
    compare(total);
  endtask

  initial begin
    for (int k = 0; k < N; k++) pat_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the patterns
    for (int e = 0; e < P; e++) begin
      for (int k = 0; k < N; k++) pats[e][k] = dna($urandom);
      @(negedge clk);
      pat_sel = 2'(e);
      for (int k = 0; k < N; k++) pat_in[k] = pats[e][k];
      pat_we = 1;
      @(negedge clk);
      pat_we = 0;
    end
    make_text(TEXT_LEN, 20);
    run(TEXT_LEN, 2, 0, 0);
    run(TEXT_LEN, 1, 1, 25);
    // densely planted copies and a DRAM that accepts few writes
    make_text(TEXT_LEN, 6);
    run(TEXT_LEN, 2, 0, 99);
    make_text(TEXT_LEN, 3);
    run(TEXT_LEN, 2, 0, 0);
    make_text(TEXT_LEN, 3);
    run(TEXT_LEN, 2, 1, 10);
    run(5, 2, 0, 0);
    check("done stays", int'(done), 1);
    $display("hits=%0d multi=%0d valid=%0d late=%0d discard=%0d drop=%0d wait=%0d hold=%0d flush=%0d wr_stall=%0d launches=%0d",
             c_hit, c_multi, c_valid, c_late, c_disc, c_drop, c_wait, c_hold, c_flush,
             u_dram.wr_stalls, c_launch);
    checks++;
    if (c_hit == 0 || c_multi == 0 || c_valid == 0 || c_late == 0 || c_disc == 0 ||
        c_drop == 0 || c_wait == 0 || c_hold == 0 || c_flush == 0 || u_dram.wr_stalls == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
