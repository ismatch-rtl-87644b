// validation_block: validation of the occurrences of one Levenshtein
// distance (one priority level).
//
// A match found by the edit distance array is usually also found, with a
// worse or equal distance, at neighbouring window positions and as part of
// longer matches. This block keeps one candidate occurrence of its own
// distance and decides whether it is reported. It works on `step` pulses,
// one per window position (the window slides one character per step):
//
//   capture : a hit of this distance is taken when neither this block nor a
//             block of higher priority (lower distance, `busy_hi`) is busy;
//             otherwise it is dropped. The counter starts at 0.
//   count   : every later step increments the counter (cnt).
//   validate: with no higher-priority block busy,
//             cnt == length                      -> valid
//             cnt >  length (it was held back)   -> valid only when
//                      cnt - last_len > length, else discarded as part of the
//                      higher-priority occurrence validated last
//
// `last_len` is the length of the last occurrence validated in the whole
// validation scheme. `busy` is high from capture until the step that
// validates or discards. A block finishing in a step may capture a new hit
// in that same step. `valid` and `discard` are one-cycle pulses in the cycle
// after the step, with `occ_out` holding the occurrence.
//
// The counter, the = and > comparisons, the subtraction against the last
// validated length and the busy gating follow the ISMatch paper's validation
// block; resetting the counter at capture, the same-step recapture and the
// saturating counter are this design's choices.
module validation_block
  import ismatch_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,      // window slid by one character
  input  logic             hit_in,    // hit of this block's distance (with step)
  input  occ_t             occ_in,
  input  logic             busy_hi,   // some higher-priority block is busy
  input  logic [LEN_W-1:0] last_len,  // length of the last validated occurrence
  output logic             busy,
  output logic             valid,     // occurrence validated (pulse)
  output logic             discard,   // candidate dropped as a substring (pulse)
  output logic             drop,      // incoming hit rejected (pulse)
  output occ_t             occ_out
);

  occ_t             cand;   // occurrence under validation
  logic [LEN_W-1:0] cnt;
  logic [LEN_W-1:0] cnt_n;
  logic             eq_hit, gt_hit, outside, finish_ok, finish_no;

  always_comb begin
    cnt_n     = (cnt == '1) ? cnt : cnt + LEN_W'(1);
    eq_hit    = (cnt_n == cand.len);
    gt_hit    = (cnt_n >  cand.len);
    // cnt - last_len > len, evaluated without wrap-around
    outside   = ({1'b0, cnt_n} > ({1'b0, last_len} + {1'b0, cand.len}));
    finish_ok = busy && !busy_hi && (eq_hit || (gt_hit && outside));
    finish_no = busy && !busy_hi && gt_hit && !outside;
  end

  logic take;
  assign take = step && hit_in && !busy_hi && (!busy || finish_ok || finish_no);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      valid   <= 1'b0;
      discard <= 1'b0;
      drop    <= 1'b0;
      occ_out <= '0;
      cand    <= '0;
    end else begin
      valid   <= 1'b0;
      discard <= 1'b0;
      drop    <= 1'b0;
      if (step) begin
        if (busy) begin
          cnt <= cnt_n;
          if (finish_ok) begin
            valid   <= 1'b1;
            occ_out <= cand;
            busy    <= 1'b0;
          end else if (finish_no) begin
            discard <= 1'b1;
            busy    <= 1'b0;
          end
        end
        if (take) begin
          busy    <= 1'b1;
          cnt     <= '0;
          cand    <= occ_in;
        end else if (hit_in) begin
          drop <= 1'b1;
        end
      end
    end
  end

endmodule
