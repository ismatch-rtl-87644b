// tb_text_window: checks the window fetch unit with a DRAM model.
// A random text is placed in DRAM; characters become available a few at a
// time (the host is still streaming), so the unit must wait (stall_data).
// Whenever the window is full, its contents and index must equal the text
// at that position; the test then slides it at random moments. The read
// addresses must be text_base + 4 * index, and the last window must be
// flagged and no read may go beyond text_len.
module tb_text_window;
  import ismatch_pkg::*;

  localparam int N = 8;
  localparam int LEN = 300;
  localparam logic [31:0] BASE = 32'h100;

  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  logic [31:0] text_base = BASE, text_len = LEN, chars_avail = 0;
  logic rd_req, rd_valid, win_full, last, stall_data;
  logic [31:0] rd_addr;
  word_t rd_data;
  char_t window [N];
  logic [IDX_W-1:0] win_index;
  int checks = 0, failures = 0, stalls = 0, windows = 0, lasts = 0;
  byte unsigned text [LEN];

  text_window #(.N(N)) dut (.*);
  dram_model #(.WORDS(1024), .RD_LAT(3), .STALL_WR(0)) u_dram (
    .clk, .rd_req, .rd_addr, .rd_valid, .rd_data,
    .wr_req(1'b0), .wr_addr(32'd0), .wr_data(32'd0), .wr_ready());

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  int exp_rd = 0;
  always @(posedge clk) if (rst_n && rd_req) begin
    check("read address", int'(rd_addr), int'(BASE) + 4 * exp_rd);
    checks++;
    if (exp_rd >= LEN || exp_rd >= int'(chars_avail)) begin
      failures++;
      $display("FAIL read beyond available text at %0d", exp_rd);
    end
    exp_rd++;
  end
  always @(posedge clk) if (stall_data) stalls++;

  initial begin
    for (int i = 0; i < LEN; i++) begin
      text[i] = 8'($urandom);
      u_dram.mem[(BASE >> 2) + i] = {24'($urandom), text[i]};
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    while (windows < LEN - N + 1) begin
      @(negedge clk);
      shift = 0;
      if ($urandom % 5 == 0 && chars_avail < LEN) chars_avail = chars_avail + 1 + $urandom % 3;
      if (chars_avail > LEN) chars_avail = LEN;
      if (win_full && $urandom % 3 == 0) begin
        for (int k = 0; k < N; k++) check("window", int'(window[k]), int'(text[int'(win_index) + k]));
        check("index", int'(win_index), windows);
        check("last", int'(last), int'(windows == LEN - N));
        if (last) lasts++;
        windows++;
        shift = 1;
      end
    end
    @(negedge clk); shift = 0;
    repeat (20) @(negedge clk);
    check("no refill beyond end", int'(win_full), 0);
    check("reads", exp_rd, LEN);
    checks++;
    if (stalls == 0 || lasts != 1) begin
      failures++;
      $display("FAIL stalls=%0d lasts=%0d", stalls, lasts);
    end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
