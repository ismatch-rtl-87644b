// validation: the validation scheme of one pattern, made of K+1
// validation_block instances, one per Levenshtein distance 0..K.
//
// A hit from the edit distance array is routed by its distance to the block
// of that distance (block 0 validates exact matches). Block i is held back
// by the busy signals of all blocks 0..i-1, so lower distances have
// priority: a running exact-match validation inhibits blocks 1..K, and so on.
// The scheme remembers the length of the last occurrence it validated and
// gives it to every block for the substring test. Because a validating block
// is still busy in its validation step, lower-priority blocks cannot validate
// in the same step, so at most one occurrence leaves per step; `valid`
// pulses one cycle after the step with the occurrence in `occ_out`.
// Hits with a distance above K are ignored (the threshold given to the edit
// distance array must not exceed K).
//
// The K+1-block structure, the routing by distance and the busy chain follow
// the ISMatch paper; the output multiplexer and the shared last-length register
// are this design's reading of it.
module validation
  import ismatch_pkg::*;
#(
  parameter int unsigned K = 2    // largest distance that can be validated
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,       // one pulse per window position
  input  logic  hit,        // edit distance hit, valid with step
  input  occ_t  occ_in,
  output logic  valid,      // validated occurrence (pulse)
  output occ_t  occ_out,
  output logic  busy_any,   // a validation is still running
  output logic  discard,    // a held-back candidate was dropped as a substring
  output logic  drop        // a hit was rejected at capture
);

  logic [K:0] busy, valid_v, discard_v, drop_v, hit_v, busy_hi;
  occ_t       occ_v [K+1];
  logic [LEN_W-1:0] last_len;

  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int i = 0; i <= K; i++) begin
      busy_hi[i] = acc;
      acc        = acc | busy[i];
    end
    for (int i = 0; i <= K; i++)
      hit_v[i] = hit && (occ_in.distance == DIST_W'(i));
  end

  for (genvar i = 0; i <= K; i++) begin : g_blk
    validation_block u_blk (
      .clk      (clk),
      .rst_n    (rst_n),
      .step     (step),
      .hit_in   (hit_v[i]),
      .occ_in   (occ_in),
      .busy_hi  (busy_hi[i]),
      .last_len (last_len),
      .busy     (busy[i]),
      .valid    (valid_v[i]),
      .discard  (discard_v[i]),
      .drop     (drop_v[i]),
      .occ_out  (occ_v[i])
    );
  end

  always_comb begin
    occ_out = '0;
    for (int i = K; i >= 0; i--)
      if (valid_v[i]) occ_out = occ_v[i];
  end

  assign valid    = |valid_v;
  assign busy_any = |busy;
  assign discard  = |discard_v;
  assign drop     = |drop_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last_len <= '0;
    else if (valid)  last_len <= occ_out.len;
  end

  // Only one block can validate per step.
  a_one_valid: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(valid_v));

endmodule
