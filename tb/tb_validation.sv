// tb_validation: checks a validation scheme (K = 2, three priority levels)
// against the step-level reference model. Streams of random hits with
// random distances and lengths are applied, one per step, with gaps so that
// held-back candidates finish; every validated occurrence, discard and
// dropped hit must match the model. Each mechanism (validation on the exact
// count, late validation, discard as a substring, rejected hit) must occur.
module tb_validation;
  import ismatch_pkg::*;
  import ismatch_ref_pkg::*;

  localparam int K = 2;

  logic clk = 0, rst_n = 0, step = 0, hit = 0;
  occ_t occ_in = '0, occ_out;
  logic valid, busy_any, discard, drop;
  int checks = 0, failures = 0;
  int n_valid = 0, n_late = 0, n_disc = 0, n_drop = 0;

  validation #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  initial begin
    val_model m;
    m = new(K);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 20000; s++) begin
      bit h, ev;
      int d, l, ix, od, ol, oi, nd, nr;
      h  = ($urandom % 3) == 0;
      d  = $urandom % (K + 1);
      l  = 1 + $urandom % 8;
      ix = s;
      ev = m.step(h, d, l, ix, od, ol, oi, nd, nr);
      @(negedge clk);
      step = 1; hit = h;
      occ_in.distance = DIST_W'(d); occ_in.len = LEN_W'(l); occ_in.index = IDX_W'(ix);
      @(negedge clk);
      step = 0; hit = 0;
      check("valid", int'(valid), int'(ev));
      check("discard", int'(discard), int'(nd > 0));
      check("drop", int'(drop), int'(nr > 0));
      if (ev) begin
        check("dist", int'(occ_out.distance), od);
        check("len", int'(occ_out.len), ol);
        check("index", int'(occ_out.index), oi);
        n_valid++;
        if (s - oi > ol) n_late++;
      end
      n_disc += nd;
      n_drop += nr;
      check("busy", int'(busy_any), int'(m.any_busy()));
      // idle cycles between steps do not change anything
      if ($urandom % 4 == 0) repeat (2) @(negedge clk);
    end
    $display("valid=%0d late=%0d discard=%0d drop=%0d", n_valid, n_late, n_disc, n_drop);
    checks++;
    if (n_valid == 0 || n_late == 0 || n_disc == 0 || n_drop == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
