// tb_lev_pe: checks one processing element against the reference matrix.
// The PE under test owns row IDX+1. Its upper neighbour row is driven from
// the reference matrix, the wavefront counter is stepped through 0..2N-2,
// and the PE's row registers must then equal the reference row, each column
// written exactly at t = j + IDX - 1. Random DNA strings plus the worked
// example of the ISMatch paper (pattern CTGA against window CTTAC, N = 5).
module tb_lev_pe;
  import ismatch_pkg::*;
  import ismatch_ref_pkg::*;

  localparam int N   = 5;
  localparam int IDX = 2;
  localparam int VAL_W = $clog2(N + 2);
  localparam int T_W   = $clog2(2 * N);

  logic clk = 0, rst_n = 0, en = 0;
  logic [T_W-1:0]   t = '0;
  char_t            window [N];
  char_t            pat_char;
  logic [VAL_W-1:0] prev_row [N+1];
  logic [VAL_W-1:0] row      [N+1];
  int checks = 0, failures = 0;

  lev_pe #(.N(N), .IDX(IDX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(str_t p, str_t s);
    mat_t d;
    d = lev_matrix(p, s, N);
    for (int k = 0; k < N; k++) window[k] = s[k];
    pat_char = p[IDX];
    for (int k = 0; k <= N; k++) prev_row[k] = VAL_W'(d[IDX][k]);
    for (int tt = 0; tt <= 2 * N - 2; tt++) begin
      @(negedge clk);
      en = 1; t = T_W'(tt);
      @(posedge clk); #1;
      // column j = tt - IDX + 1 becomes visible right after this edge
      if (tt - IDX + 1 >= 1 && tt - IDX + 1 <= N) begin
        checks++;
        if (int'(row[tt-IDX+1]) != d[IDX+1][tt-IDX+1]) begin
          failures++;
          $display("FAIL t=%0d col=%0d got %0d exp %0d", tt, tt-IDX+1,
                   row[tt-IDX+1], d[IDX+1][tt-IDX+1]);
        end
      end
    end
    @(negedge clk); en = 0;
    // a held PE keeps its row
    repeat (3) @(posedge clk);
    #1;
    for (int k = 0; k <= N; k++) begin
      checks++;
      if (int'(row[k]) != d[IDX+1][k]) begin
        failures++;
        $display("FAIL final col=%0d got %0d exp %0d", k, row[k], d[IDX+1][k]);
      end
    end
  endtask

  initial begin
    str_t p, s;
    for (int k = 0; k < N; k++) window[k] = '0;
    pat_char = '0;
    for (int k = 0; k <= N; k++) prev_row[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // worked example: p = CTGA, s = CTTAC (pattern padded with T)
    p[0] = "C"; p[1] = "T"; p[2] = "G"; p[3] = "A"; p[4] = "T";
    s[0] = "C"; s[1] = "T"; s[2] = "T"; s[3] = "A"; s[4] = "C";
    run(p, s);
    for (int r = 0; r < 200; r++) begin
      for (int k = 0; k < N; k++) begin
        p[k] = dna($urandom);
        s[k] = dna($urandom);
      end
      run(p, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
