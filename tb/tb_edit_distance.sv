// tb_edit_distance: checks the systolic Levenshtein array at its default
// size (N = 8). Random DNA windows are compared with random patterns and
// with mutated copies of the window (so low distances and hits occur); the
// distance, occurrence length, index and hit flag are checked against the
// reference model, and the start-to-done latency must be 2N+1 = 17 cycles.
// Some runs are launched back to back (start in the cycle before done).
module tb_edit_distance;
  import ismatch_pkg::*;
  import ismatch_ref_pkg::*;

  localparam int N = 8;

  logic              clk = 0, rst_n = 0;
  logic              pat_we = 0, start = 0, ready, done, hit;
  char_t             pat_in [N];
  char_t             window_in [N];
  logic [IDX_W-1:0]  index_in = '0;
  logic [DIST_W-1:0] threshold = 16'd2;
  occ_t              occ;
  int checks = 0, failures = 0, hits = 0, b2b = 0;
  longint cyc = 0;

  edit_distance #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic one(str_t p, str_t s, int idx, int thr, bit back_to_back);
    int ed, el;
    longint t0;
    best_of_row(p, s, N, ed, el);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      pat_in[k] = p[k];
      window_in[k] = s[k];
    end
    pat_we = 1;
    @(negedge clk);
    pat_we = 0;
    threshold = DIST_W'(thr);
    index_in  = IDX_W'(idx);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    for (int k = 0; k < N; k++) window_in[k] = "x";  // latched copy is used
    while (!done) begin
      @(negedge clk);
      if (back_to_back && !done && cyc - t0 == 2 * N) begin
        // ready must already be up in the cycle before done
        check("ready before done", int'(ready), 1);
      end
    end
    check("latency", int'(cyc - t0), 2 * N + 1);
    check("distance", int'(occ.distance), ed);
    check("length", int'(occ.len), el);
    check("index", int'(occ.index), idx);
    check("hit", int'(hit), int'(ed <= thr));
    if (hit) hits++;
  endtask

  initial begin
    str_t p, s;
    for (int k = 0; k < N; k++) begin
      pat_in[k] = '0;
      window_in[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // worked example padded to 8: pattern CTGAACGT, window CTTACGGA
    p[0]="C"; p[1]="T"; p[2]="G"; p[3]="A"; p[4]="A"; p[5]="C"; p[6]="G"; p[7]="T";
    s[0]="C"; s[1]="T"; s[2]="T"; s[3]="A"; s[4]="C"; s[5]="G"; s[6]="G"; s[7]="A";
    one(p, s, 7, 2, 0);
    for (int r = 0; r < 400; r++) begin
      for (int k = 0; k < N; k++) s[k] = dna($urandom);
      if (r % 2 == 0) begin
        for (int k = 0; k < N; k++) p[k] = dna($urandom);
      end else begin
        p = s;
        for (int m = 0; m < int'($urandom % 3); m++) p[$urandom % N] = dna($urandom);
      end
      one(p, s, int'($urandom), int'($urandom % 4), r % 3 == 0);
    end
    // back-to-back: second start while the first run reduces its result
    begin
      longint t1;
      for (int k = 0; k < N; k++) window_in[k] = s[k];
      @(negedge clk);
      start = 1;
      t1 = cyc;
      @(negedge clk);
      start = 0;
      while (!ready) @(negedge clk);
      start = 1;
      check("relaunch spacing", int'(cyc - t1), 2 * N);
      @(negedge clk);
      start = 0;
      b2b++;
      while (!done) @(negedge clk);
      @(negedge clk);
      while (!done) @(negedge clk);
      check("second result spacing", int'(cyc - t1), 4 * N + 1);
    end
    checks++;
    if (hits == 0) begin
      failures++;
      $display("FAIL no hit ever");
    end
    $display("hits=%0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
