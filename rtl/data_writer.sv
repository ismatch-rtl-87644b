// data_writer: the data writing block that collects the validated
// occurrences of all P pattern engines and stores them in DRAM.
//
// Each engine may validate one occurrence per window step, and they do so in
// the same cycles, so every engine has its own small FIFO. A round-robin
// arbiter takes one occurrence at a time and writes it as two 32-bit words at
// consecutive addresses from result_base on: first {length[31:16],
// distance[15:0]}, then the 32-bit text index. Accesses are strictly
// sequential, so engines never collide on the DRAM port.
//
// DRAM write port: wr_req/wr_addr/wr_data are held until wr_ready; one word
// moves in each cycle with both high. `space_low` is high when some FIFO has
// fewer than two free entries: the step controller then holds the next
// window step, which keeps the FIFOs from overflowing when DRAM writes are
// slow. `n_written` counts stored occurrences; `idle` means nothing is
// queued or being written.
//
// The collecting block, the sequential DRAM access and the two-word record
// follow the ISMatch paper; the FIFOs, the round-robin order and the back-pressure
// rule are this design's choices.
module data_writer
  import ismatch_pkg::*;
#(
  parameter int unsigned P          = 4,   // pattern engines
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [31:0] result_base,
  input  logic        in_valid [P],
  input  occ_t        in_occ   [P],
  output logic        space_low,
  // DRAM write port
  output logic        wr_req,
  output logic [31:0] wr_addr,
  output word_t       wr_data,
  input  logic        wr_ready,
  output logic [31:0] n_written,
  output logic        idle
);

  localparam int unsigned OCC_W = $bits(occ_t);
  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned SEL_W = (P > 1) ? $clog2(P) : 1;

  logic [P-1:0]     f_empty, f_pop;
  logic [OCC_W-1:0] f_data  [P];
  logic [CNT_W-1:0] f_count [P];

  for (genvar i = 0; i < P; i++) begin : g_fifo
    sync_fifo #(.WIDTH(OCC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .clear   (clear),
      .push    (in_valid[i]),
      .wr_data (in_occ[i]),
      .pop     (f_pop[i]),
      .rd_data (f_data[i]),
      .empty   (f_empty[i]),
      .full    (),
      .count   (f_count[i])
    );
  end

  always_comb begin
    space_low = 1'b0;
    for (int i = 0; i < P; i++)
      if (32'(f_count[i]) + 2 > FIFO_DEPTH) space_low = 1'b1;
  end

  // Writer: 0 = choose, 1 = first word, 2 = second word.
  typedef enum logic [1:0] {W_PICK, W_WORD0, W_WORD1} wstate_t;
  wstate_t          ws;
  logic [SEL_W-1:0] rr;       // engine served first in the next pick
  occ_t             cur;
  logic [31:0]      addr;

  // Round-robin choice among non-empty FIFOs.
  logic             found;
  logic [SEL_W-1:0] pick;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < P; k++) begin
      automatic int unsigned idx = (32'(rr) + k) % P;
      if (!found && !f_empty[idx]) begin
        found = 1'b1;
        pick  = SEL_W'(idx);
      end
    end
    f_pop = '0;
    if (ws == W_PICK && found) f_pop[pick] = 1'b1;
  end

  assign wr_req  = (ws != W_PICK);
  assign wr_addr = (ws == W_WORD1) ? addr + 32'd4 : addr;
  assign wr_data = (ws == W_WORD1) ? word_t'(cur.index) : {cur.len, cur.distance};
  assign idle    = (ws == W_PICK) && (&f_empty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws        <= W_PICK;
      rr        <= '0;
      cur       <= '0;
      addr      <= '0;
      n_written <= '0;
    end else if (clear) begin
      ws        <= W_PICK;
      rr        <= '0;
      addr      <= result_base;
      n_written <= '0;
    end else begin
      case (ws)
        W_PICK: if (found) begin
          cur <= f_data[pick];
          rr  <= (32'(pick) == P - 1) ? '0 : pick + SEL_W'(1);
          ws  <= W_WORD0;
        end
        W_WORD0: if (wr_ready) ws <= W_WORD1;
        W_WORD1: if (wr_ready) begin
          ws        <= W_PICK;
          addr      <= addr + 32'd8;
          n_written <= n_written + 32'd1;
        end
        default: ws <= W_PICK;
      endcase
    end
  end

endmodule
