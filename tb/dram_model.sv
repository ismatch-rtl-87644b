// dram_model: behavioural model of the board DRAM as seen by the
// accelerator (not synthesizable). Byte-addressed array of 32-bit words.
// Read port: a one-cycle rd_req returns the word RD_LAT cycles later with
// rd_valid. Write port: a word is written in each cycle where wr_req and
// wr_ready are both high; when STALL_WR is set, wr_ready is dropped at
// random to emulate a busy memory controller. The testbench fills and
// inspects `mem` directly, as the host would over PCIe.
module dram_model #(
  parameter int unsigned WORDS    = 4096,
  parameter int unsigned RD_LAT   = 2,
  parameter bit          STALL_WR = 1'b1
) (
  input  logic        clk,
  input  logic        rd_req,
  input  logic [31:0] rd_addr,
  output logic        rd_valid,
  output logic [31:0] rd_data,
  input  logic        wr_req,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data,
  output logic        wr_ready
);
  logic [31:0] mem [WORDS];
  logic        v_pipe [RD_LAT];
  logic [31:0] d_pipe [RD_LAT];
  int          wr_stalls = 0;
  int          stall_pct = STALL_WR ? 25 : 0;  // refused writes, percent; set by the testbench

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    for (int i = 0; i < int'(RD_LAT); i++) begin
      v_pipe[i] = 1'b0;
      d_pipe[i] = '0;
    end
    wr_ready = 1'b1;
  end

  assign rd_valid = v_pipe[RD_LAT-1];
  assign rd_data  = d_pipe[RD_LAT-1];

  always @(posedge clk) begin
    for (int i = int'(RD_LAT) - 1; i > 0; i--) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
    v_pipe[0] <= rd_req;
    d_pipe[0] <= mem[(rd_addr >> 2) % WORDS];
    if (wr_req && wr_ready) mem[(wr_addr >> 2) % WORDS] <= wr_data;
    if (wr_req && !wr_ready) wr_stalls++;
    wr_ready <= (($urandom % 100) >= stall_pct);
  end
endmodule
