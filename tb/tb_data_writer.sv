// tb_data_writer: checks the data writing block with four sources and a
// DRAM model that refuses writes at random. Sources push occurrences in the
// same cycles, only while space_low is low (as the step controller does).
// Afterwards the DRAM must hold every pushed occurrence exactly once, as two
// words ({length, distance}, index) from result_base on, each source's
// occurrences in their order, and n_written must equal the number pushed.
module tb_data_writer;
  import ismatch_pkg::*;

  localparam int P = 4;
  localparam logic [31:0] RBASE = 32'h2000;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [31:0] result_base = RBASE;
  logic in_valid [P];
  occ_t in_occ [P];
  logic space_low, wr_req, wr_ready, idle;
  logic [31:0] wr_addr, n_written;
  word_t wr_data;
  int checks = 0, failures = 0, low_seen = 0;
  occ_t pushed [P][$];

  data_writer #(.P(P), .FIFO_DEPTH(4)) dut (.*);
  dram_model #(.WORDS(8192), .RD_LAT(1), .STALL_WR(1)) u_dram (
    .clk, .rd_req(1'b0), .rd_addr(32'd0), .rd_valid(), .rd_data(),
    .wr_req, .wr_addr, .wr_data, .wr_ready);

  always #5 clk = ~clk;

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

  initial begin
    int total = 0;
    for (int i = 0; i < P; i++) begin
      in_valid[i] = 0;
      in_occ[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int s = 0; s < 600; s++) begin
      @(negedge clk);
      for (int i = 0; i < P; i++) in_valid[i] = 0;
      if (space_low) low_seen++;
      else if ($urandom % 2 == 0) begin
        for (int i = 0; i < P; i++) if ($urandom % 2 == 0) begin
          occ_t o;
          o.len = 16'($urandom); o.distance = 16'($urandom % 3); o.index = $urandom;
          in_valid[i] = 1;
          in_occ[i] = o;
          pushed[i].push_back(o);
          total++;
        end
      end
    end
    @(negedge clk);
    for (int i = 0; i < P; i++) in_valid[i] = 0;
    while (!idle) @(negedge clk);
    check("count", int'(n_written), total);
    for (int r = 0; r < total; r++) begin
      logic [31:0] w0, w1;
      bit ok = 0;
      w0 = u_dram.mem[(RBASE >> 2) + 2 * r];
      w1 = u_dram.mem[(RBASE >> 2) + 2 * r + 1];
      for (int i = 0; i < P && !ok; i++)
        if (pushed[i].size() > 0 && {pushed[i][0].len, pushed[i][0].distance} == w0
            && pushed[i][0].index == w1) begin
          void'(pushed[i].pop_front());
          ok = 1;
        end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL record %0d = %h %h not expected next from any source", r, w0, w1);
      end
    end
    checks++;
    if (low_seen == 0 || u_dram.wr_stalls == 0) begin
      failures++;
      $display("FAIL back-pressure never happened");
    end
    $display("records=%0d space_low=%0d wr_stalls=%0d", total, low_seen, u_dram.wr_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
