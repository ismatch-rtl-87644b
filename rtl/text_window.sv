// text_window: the text window and DRAM address register shared by all
// pattern engines.
//
// The text sits in DRAM one character per 32-bit word (low 8 bits), at byte
// addresses text_base, text_base+4, ... The block keeps an N-character
// window, window[0] being the oldest character, whose text index is
// win_index. It fetches characters until the window is full; `shift` drops
// the oldest character (the window slides by one) and the freed slot is
// refilled by the next read. Because the host keeps streaming the text into
// DRAM while the search runs, a character is fetched only once it is
// available (index < chars_avail); until then `stall_data` is high. No
// character at or beyond text_len is fetched, and `last` marks the window
// that ends at the end of the text.
//
// DRAM read port: rd_req is a one-cycle request for rd_addr; the word
// returns later with rd_valid. One read is outstanding at a time.
// `clear` empties the window for a new search.
//
// The window register fed from DRAM words and the incremented address follow
// the ISMatch paper; the fill counter, the availability check and the one-read
// protocol are this design's choices.
module text_window
  import ismatch_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [31:0]      text_base,    // byte address of character 0
  input  logic [31:0]      text_len,     // characters in the whole text
  input  logic [31:0]      chars_avail,  // characters already in DRAM
  // DRAM read port
  output logic             rd_req,
  output logic [31:0]      rd_addr,
  input  logic             rd_valid,
  input  word_t            rd_data,
  // window
  output char_t            window [N],
  output logic [IDX_W-1:0] win_index,
  output logic             win_full,
  output logic             last,
  input  logic             shift,
  output logic             stall_data
);

  localparam int unsigned F_W = $clog2(N + 1);
  localparam int unsigned W_W = (N > 1) ? $clog2(N) : 1;  // window slot index

  logic [F_W-1:0]   fill;       // characters held
  logic [31:0]      next_idx;   // next character to fetch
  logic             pending;    // a read is outstanding

  logic want, can;
  always_comb begin
    want       = !pending && ((fill < F_W'(N)) || shift) && (next_idx < text_len);
    can        = next_idx < chars_avail;
    stall_data = want && !can;
    win_full   = (fill == F_W'(N));
    last       = win_full && ((win_index + IDX_W'(N)) >= text_len);
  end

  assign rd_req  = want && can && !clear;
  assign rd_addr = text_base + {next_idx[29:0], 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      next_idx  <= '0;
      pending   <= 1'b0;
      win_index <= '0;
      for (int k = 0; k < N; k++) window[k] <= '0;
    end else if (clear) begin
      fill      <= '0;
      next_idx  <= '0;
      pending   <= 1'b0;
      win_index <= '0;
    end else begin
      automatic logic [F_W-1:0] f = fill;
      if (shift && fill != '0) begin
        for (int k = 0; k < N - 1; k++) window[k] <= window[k+1];
        f         = f - F_W'(1);
        win_index <= win_index + IDX_W'(1);
      end
      if (rd_valid && pending) begin
        window[W_W'(f)] <= rd_data[CHAR_W-1:0];  // upper bits: other data, unused
        f         = f + F_W'(1);
        pending   <= 1'b0;
      end
      if (rd_req) begin
        pending  <= 1'b1;
        next_idx <= next_idx + 32'd1;
      end
      fill <= f;
    end
  end

endmodule
