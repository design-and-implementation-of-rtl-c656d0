// pair_locator: compressed line locator of a pair-matching compressed cache.
//
// In a pair-matching cache a physical line holds either one line (compressed
// or not) or two compressed lines whose sizes add up to less than the line
// size (512 bits).  Partners are only looked for within the set.  When a
// newly compressed line of req_size bits is to be stored, the locator picks
// the place with a "best fit + best fit" policy:
//
//   1 Without evicting anything: among the physical lines of the set that are
//     empty, or hold one line with enough free space beside it, take the one
//     that leaves the least free space (a partner before an empty line).
//   2 Otherwise evict one compressed line: among all single evictions after
//     which the new line fits, take the one that leaves the least free space.
//   3 Otherwise evict both lines of a physical line (the lowest-numbered way,
//     all of them being full).
//
// Ties go to the lowest way, then to slot 0.  The decision comes out as the
// way, the slot the new line goes into, which slots are evicted, and the kind
// of placement.
//
// Interface: req_valid/req_size with the state of the set's ways (ways[]),
// all sampled together; rsp_* are valid with rsp_valid.  Requests may come
// every cycle.
//
// Timing: two cycles, the worst-case delay given for the locator.  Stage 1
// works out, for each way on its own, its best placement and the space it
// leaves; stage 2 picks the best way.
//
// From the scheme: the pairing rule (sum of the two sizes below one line),
// partners from the same set only, one or two evictions when no partner
// fits, best fit, and the two-cycle delay.  This design's own choices: the
// way/slot state it reads, the tie-breaking, the choice of way when two
// lines must go, and the two-stage split.
module pair_locator
  import cpack_pkg::*;
#(
  parameter int unsigned WAYS      = 8,
  parameter int unsigned LINE_SIZE = LINE_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  input  logic [TOTAL_W-1:0]      req_size,
  input  loc_way_t                ways [WAYS],
  output logic                    rsp_valid,
  output logic [$clog2(WAYS)-1:0] rsp_way,
  output logic                    rsp_slot,    // slot the new line takes
  output logic [1:0]              rsp_evict,   // slots evicted
  output loc_action_e             rsp_action
);

  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned SW    = TOTAL_W + 1;   // slack, may not be negative

  typedef struct packed {
    logic [1:0]  cls;      // 0 no eviction, 1 one eviction, 2 two evictions
    logic [SW-1:0] slack;  // free space left after placement
    logic        slot;
    logic [1:0]  evict;
    loc_action_e action;
  } cand_t;

  // ------------------------------------------------ stage 1: per-way choice
  function automatic cand_t way_choice(loc_way_t w, logic [TOTAL_W-1:0] sz);
    cand_t c;
    logic [SW-1:0] line, s0, s1, n;
    logic          fit0, fit1;
    line = SW'(LINE_SIZE);
    s0   = SW'(w.size[0]);
    s1   = SW'(w.size[1]);
    n    = SW'(sz);
    c    = '{cls: 2'd2, slack: (line > n) ? line - n : '0, slot: 1'b0,
             evict: 2'b11, action: LOC_EVICT_TWO};
    case (w.valid)
      2'b00: begin
        c = '{cls: 2'd0, slack: (line > n) ? line - n : '0, slot: 1'b0,
              evict: 2'b00, action: LOC_EMPTY};
      end
      2'b01, 2'b10: begin
        // one resident line: partner it if the two fit, else evict it
        logic          r;
        logic [SW-1:0] used;
        r    = w.valid[1];
        used = r ? s1 : s0;
        if (used + n < line)
          c = '{cls: 2'd0, slack: line - used - n, slot: !r, evict: 2'b00,
                action: LOC_PARTNER};
        else
          c = '{cls: 2'd1, slack: (line > n) ? line - n : '0, slot: r,
                evict: r ? 2'b10 : 2'b01, action: LOC_EVICT_ONE};
      end
      default: begin
        // two resident lines: evict the one that leaves the best fit
        fit0 = (s1 + n < line);   // evict slot 0, keep slot 1
        fit1 = (s0 + n < line);   // evict slot 1, keep slot 0
        if (fit0 && (!fit1 || s1 >= s0))
          c = '{cls: 2'd1, slack: line - s1 - n, slot: 1'b0, evict: 2'b01,
                action: LOC_EVICT_ONE};
        else if (fit1)
          c = '{cls: 2'd1, slack: line - s0 - n, slot: 1'b1, evict: 2'b10,
                action: LOC_EVICT_ONE};
      end
    endcase
    return c;
  endfunction

  cand_t cand_q [WAYS];
  logic  v1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      for (int i = 0; i < WAYS; i++) cand_q[i] <= '0;
    end else begin
      v1_q <= req_valid;
      if (req_valid)
        for (int i = 0; i < WAYS; i++) cand_q[i] <= way_choice(ways[i], req_size);
    end
  end

  // ------------------------------------------------ stage 2: best way
  logic [WAY_W-1:0] best_way;
  cand_t            best;

  always_comb begin
    best_way = '0;
    best     = cand_q[0];
    for (int i = 1; i < WAYS; i++) begin
      if (cand_q[i].cls < best.cls ||
          (cand_q[i].cls == best.cls && cand_q[i].slack < best.slack)) begin
        best     = cand_q[i];
        best_way = WAY_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid  <= 1'b0;
      rsp_way    <= '0;
      rsp_slot   <= 1'b0;
      rsp_evict  <= '0;
      rsp_action <= LOC_EMPTY;
    end else begin
      rsp_valid <= v1_q;
      if (v1_q) begin
        rsp_way    <= best_way;
        rsp_slot   <= best.slot;
        rsp_evict  <= best.evict;
        rsp_action <= best.action;
      end
    end
  end

endmodule
