// tb_validation_block: checks one validation block in isolation.
// Directed cases: an occurrence of length L is validated exactly L steps
// after capture; a hit while busy is rejected; a candidate held back by a
// busy higher-priority block is validated late when it starts more than its
// length before the last validated occurrence, and discarded otherwise.
// Then random steps with random busy_hi / last_len are compared with an
// independent single-level model of the same rules.
module tb_validation_block;
  import ismatch_pkg::*;

  logic clk = 0, rst_n = 0, step = 0, hit_in = 0, busy_hi = 0;
  occ_t occ_in = '0, occ_out;
  logic [LEN_W-1:0] last_len = '0;
  logic busy, valid, discard, drop;
  int checks = 0, failures = 0;

  validation_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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

  // model state
  bit m_busy = 0;
  int m_cnt = 0, m_len = 0, m_idx = 0;

  task automatic do_step(bit h, int len, int idx, bit hi, int ll);
    bit ev = 0, ed = 0, er = 0, fin = 0;
    int oi = 0, ol = 0;
    if (m_busy) begin
      m_cnt++;
      if (!hi && (m_cnt == m_len || (m_cnt > m_len && m_cnt - ll > m_len))) begin
        ev = 1; oi = m_idx; ol = m_len; m_busy = 0; fin = 1;
      end else if (!hi && m_cnt > m_len) begin
        ed = 1; m_busy = 0; fin = 1;
      end
    end
    if (h) begin
      if (!hi && (!m_busy || fin)) begin
        m_busy = 1; m_cnt = 0; m_len = len; m_idx = idx;
      end else er = 1;
    end
    @(negedge clk);
    step = 1; hit_in = h; busy_hi = hi; last_len = LEN_W'(ll);
    occ_in.len = LEN_W'(len); occ_in.index = IDX_W'(idx); occ_in.distance = 16'd1;
    @(negedge clk);
    step = 0; hit_in = 0;
    check("valid", int'(valid), int'(ev));
    check("discard", int'(discard), int'(ed));
    check("drop", int'(drop), int'(er));
    check("busy", int'(busy), int'(m_busy));
    if (ev) begin
      check("index", int'(occ_out.index), oi);
      check("len", int'(occ_out.len), ol);
      check("dist", int'(occ_out.distance), 1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // exact count: length 4 validated on the 4th step after capture
    do_step(1, 4, 100, 0, 0);
    do_step(1, 3, 101, 0, 0);   // rejected: busy
    do_step(0, 0, 0, 0, 0);
    do_step(0, 0, 0, 0, 0);
    do_step(0, 0, 0, 0, 0);     // valid here
    // held back, then late validation (cnt - last_len > len)
    do_step(1, 2, 200, 0, 0);
    do_step(0, 0, 0, 1, 0);
    do_step(0, 0, 0, 1, 0);
    do_step(0, 0, 0, 1, 0);
    do_step(0, 0, 0, 1, 0);
    do_step(0, 0, 0, 0, 1);     // cnt 5, 5-1 > 2 -> valid
    // held back, then discarded as part of a longer occurrence
    do_step(1, 3, 300, 0, 0);
    do_step(0, 0, 0, 1, 0);
    do_step(0, 0, 0, 1, 0);
    do_step(0, 0, 0, 1, 0);
    do_step(0, 0, 0, 0, 3);     // cnt 4, 4-3 > 3 false -> discard
    for (int s = 0; s < 30000; s++)
      do_step(($urandom % 3) == 0, 1 + $urandom % 6, s, ($urandom % 3) == 0, $urandom % 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
