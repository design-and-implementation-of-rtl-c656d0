// cpack_compressor: three-stage pipelined C-Pack line compressor.
//
// A 64-byte line enters as eight 64-bit beats of two 32-bit words each (first
// word in bits [31:0], so line word 2k+b arrives in beat k, half b).  Each
// beat goes through three pipeline stages:
//
//   1 Matching           Both words are compared with the static patterns
//                        zzzz / zzzx and with all 16 dictionary entries.  The
//                        second word sees the first word in place of the
//                        oldest entry whenever the first word is pushed, so a
//                        pair of similar new words still codes the second as
//                        a dictionary match.  Words that match no static
//                        pattern are pushed into the FIFO dictionary.
//   2 Length generation  Priority encoders pick, per word, the entry with the
//                        most matched leading bytes (lowest index on a tie);
//                        the word length generators give each word's coded
//                        length, the total length calculator their sum, and
//                        the length accumulator the running line total.
//   3 Packing/shifting   The code concatenators build both fields, a barrel
//                        shifter joins them into one left-aligned pair, and a
//                        second shifter appends the pair behind the bits
//                        already waiting in a 196-bit packing register.  As
//                        soon as 128 bits have gathered they leave as one
//                        output block (incremental transmission); the last
//                        block of a line is padded with zeros.
//
// If the line total reaches the uncompressed size (512 bits) the compressed
// stream is abandoned and the line is sent as it is, from its backup buffer,
// in four blocks marked out_comp = 0.  Seven pairs code to at most 476 bits,
// so this is only ever decided on the last pair.  Compressed blocks already
// sent for that line are then superseded: a new out_first starts the raw copy.
//
// Interface: in_valid/in_ready handshake on the input beats; the output has
// no back-pressure.  out_first/out_last frame the blocks of one line,
// out_comp says whether they are compressed, and out_len (with out_last) is
// the compressed length in bits, or 512 for a raw line.
//
// Timing: beat k of a line is in stage 2 two cycles after it is accepted; the
// packing stage and the output multiplexers are combinational behind the
// stage-2 register, so a block leaves in the cycle its last pair is in stage
// 2.  With back-to-back beats the last block of a raw line leaves 13 cycles
// after the first beat is accepted (cycle 12 counting that beat as cycle 0,
// 5 after the last beat), and the last block of a compressed line in cycle 9
// or 10.  Lines overlap: the next line's beats are taken right
// after the last beat of the previous one, so the input runs at one beat (64
// bits) per cycle.  There are two backup buffers, used in turn, so that the
// next line can fill one while the previous line may still fall back.  Only
// while raw blocks 1 to 3 of a line are being sent does the pipeline stall,
// with in_ready low, for 3 cycles.  A padded remainder can leave in the same
// cycle as the next line's first pair enters the packing register.
//
// From the scheme: the pattern table, two words per cycle, the second-word
// comparison with the first word, the FIFO dictionary, the three stages and
// their units, the 128-bit output blocks, zero padding and the backup buffer
// fallback.  This design's own choices: a single 196-bit packing register in
// place of the two-level 64/128-bit register arrays (a pair adds up to 68
// bits a cycle, more than a 64-bit hand-over removes, so a run of long pairs
// would outgrow a 136-bit first level; sending 128 bits at once bounds the
// waiting bits at 127 + 68), lowest-index priority,
// fallback when the total reaches rather than passes 512 bits (so a
// compressed length fits 9 bits), the second backup buffer that lets lines
// overlap, and the 3-cycle stall behind a raw line.
module cpack_compressor
  import cpack_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // input beats, two words each
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [2*WORD_W-1:0] in_data,
  // output blocks
  output logic               out_valid,
  output logic [BUS_W-1:0]   out_data,
  output logic               out_comp,
  output logic               out_first,
  output logic               out_last,
  output logic [TOTAL_W-1:0] out_len
);

  localparam int unsigned BEATS  = LINE_WORDS / 2;   // 8
  localparam int unsigned PACK_W = BUS_W + PAIR_W;   // 196
  localparam logic [$clog2(BEATS)-1:0] LAST_BEAT = $clog2(BEATS)'(BEATS - 1);

  // --------------------------------------------------------------- types
  typedef logic [DICT_ENTRIES-1:0][1:0] match_vec_t;   // 16*2 per word

  typedef struct packed {
    logic       valid;
    logic       first;
    logic       last;
    logic       bsel;    // backup buffer holding this line
    word_t      w1;
    word_t      w2;
    logic [1:0] pz1;     // {zzzz, zzzx} of word 1
    logic [1:0] pz2;
    match_vec_t mc1;     // per-entry match class, 3 = 4 bytes, 2 = 3, 1 = 2
    match_vec_t mc2;
  } s1_t;

  typedef struct packed {
    logic                  valid;
    logic                  last;
    logic                  bsel;
    word_t                 w1;
    word_t                 w2;
    pat_e                  p1;
    pat_e                  p2;
    idx_t                  idx1;
    idx_t                  idx2;
    logic [LEN_W-1:0]      len1;
    logic [PAIR_LEN_W-1:0] total_length;
    logic [TOTAL_W-1:0]    sum_total;
    logic                  overflow;
  } s2_t;

  // --------------------------------------------------------------- input
  logic [$clog2(BEATS)-1:0] beat_q;
  logic                     stall;     // a raw line is being sent
  logic                     fire;
  logic                     raw_q;

  assign stall    = raw_q;
  assign in_ready = !stall;
  assign fire     = in_valid && in_ready;

  // backup buffers: the uncompressed line, two deep so that the next line
  // can arrive while the previous one may still fall back
  logic [LINE_BITS-1:0] backup_q [2];
  logic                 wr_sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      backup_q[0] <= '0;
      backup_q[1] <= '0;
      wr_sel_q    <= 1'b0;
    end else if (fire) begin
      backup_q[wr_sel_q][beat_q*2*WORD_W +: 2*WORD_W] <= in_data;
      if (beat_q == LAST_BEAT) wr_sel_q <= !wr_sel_q;
    end
  end

  // ------------------------------------------------------- stage 1: match
  word_t      w1, w2;
  word_t      dict [DICT_ENTRIES];
  word_t      cand2 [DICT_ENTRIES];
  logic [1:0] pz1, pz2;
  logic       push1, push2;
  match_vec_t mc1, mc2;

  assign w1 = in_data[WORD_W-1:0];
  assign w2 = in_data[2*WORD_W-1:WORD_W];

  function automatic logic [1:0] zero_pat(word_t w);
    return {w == '0, (w[31:8] == '0) && (w[7:0] != '0)};
  endfunction

  function automatic logic [1:0] match_class(word_t a, word_t b);
    case (match_bytes(a, b))
      3'd4:    return 2'd3;
      3'd3:    return 2'd2;
      3'd2:    return 2'd1;
      default: return 2'd0;
    endcase
  endfunction

  always_comb begin
    // comparator array 2 / priority encoder 2: static patterns, word 1
    pz1   = zero_pat(w1);
    push1 = (pz1 == 2'b00);
    // comparator array 3 / priority encoder 3: static patterns, word 2
    pz2   = zero_pat(w2);
    push2 = (pz2 == 2'b00);
    // word 2 is matched against word 1 and all but the oldest entry when
    // word 1 enters the dictionary, else against the dictionary as it is
    if (push1) begin
      cand2[0] = w1;
      for (int i = 1; i < DICT_ENTRIES; i++) cand2[i] = dict[i-1];
    end else begin
      cand2 = dict;
    end
    // comparator arrays 1 and 4: dictionary matching
    for (int i = 0; i < DICT_ENTRIES; i++) begin
      mc1[i] = match_class(w1, dict[i]);
      mc2[i] = match_class(w2, cand2[i]);
    end
  end

  // the dictionary is emptied after the last beat of each line
  cpack_fifo_dict u_dict (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (fire && (beat_q == LAST_BEAT)),
    .push1   (fire && push1),
    .word1   (w1),
    .push2   (fire && push2),
    .word2   (w2),
    .entries (dict)
  );

  s1_t s1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q   <= '0;
      beat_q <= '0;
    end else begin
      if (!stall) s1_q.valid <= fire;
      if (fire) begin
        s1_q.first <= (beat_q == 0);
        s1_q.last  <= (beat_q == LAST_BEAT);
        s1_q.bsel  <= wr_sel_q;
        s1_q.w1    <= w1;
        s1_q.w2    <= w2;
        s1_q.pz1   <= pz1;
        s1_q.pz2   <= pz2;
        s1_q.mc1   <= mc1;
        s1_q.mc2   <= mc2;
        beat_q     <= beat_q + 1'b1;
      end
    end
  end

  // ---------------------------------------------- stage 2: length generation
  // priority encoders 1 and 4: best entry, lowest index on a tie
  function automatic void best_entry(match_vec_t mc, output idx_t idx,
                                     output logic [1:0] cls);
    idx = '0;
    cls = 2'd0;
    for (int i = DICT_ENTRIES - 1; i >= 0; i--) begin
      if (mc[i] >= cls && mc[i] != 2'd0) begin
        idx = idx_t'(i);
        cls = mc[i];
      end
    end
  endfunction

  function automatic pat_e word_pat(logic [1:0] pz, logic [1:0] cls);
    if (pz[1])           return PAT_ZZZZ;
    else if (pz[0])      return PAT_ZZZX;
    else if (cls == 2'd3) return PAT_MMMM;
    else if (cls == 2'd2) return PAT_MMMX;
    else if (cls == 2'd1) return PAT_MMXX;
    else                 return PAT_XXXX;
  endfunction

  idx_t                  dict_idx1, dict_idx2;
  logic [1:0]            bytes_matched1, bytes_matched2;
  pat_e                  p1, p2;
  logic [LEN_W-1:0]      len1, len2;
  logic [PAIR_LEN_W-1:0] total_length;
  logic [TOTAL_W-1:0]    sum_total_q, sum_total_d;

  always_comb begin
    best_entry(s1_q.mc1, dict_idx1, bytes_matched1);
    best_entry(s1_q.mc2, dict_idx2, bytes_matched2);
    p1 = word_pat(s1_q.pz1, bytes_matched1);
    p2 = word_pat(s1_q.pz2, bytes_matched2);
    // word length generators 1 and 2, total length calculator
    len1         = pat_len(p1);
    len2         = pat_len(p2);
    total_length = PAIR_LEN_W'(len1) + PAIR_LEN_W'(len2);
    // length accumulator
    sum_total_d  = (s1_q.first ? '0 : sum_total_q) + TOTAL_W'(total_length);
  end

  s2_t s2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_q        <= '0;
      sum_total_q <= '0;
    end else begin
      if (!stall) s2_q.valid <= s1_q.valid;
      if (s1_q.valid && !stall) begin
        sum_total_q         <= sum_total_d;
        s2_q.last           <= s1_q.last;
        s2_q.bsel           <= s1_q.bsel;
        s2_q.w1             <= s1_q.w1;
        s2_q.w2             <= s1_q.w2;
        s2_q.p1             <= p1;
        s2_q.p2             <= p2;
        s2_q.idx1           <= dict_idx1;
        s2_q.idx2           <= dict_idx2;
        s2_q.len1           <= len1;
        s2_q.total_length   <= total_length;
        s2_q.sum_total      <= sum_total_d;
        s2_q.overflow       <= s1_q.last && (sum_total_d >= TOTAL_W'(LINE_BITS));
      end
    end
  end

  // ------------------------------------------- stage 3: packing and shifting
  logic [PACK_W-1:0]  pack_q;        // waiting bits, left aligned
  logic [7:0]         pack_cnt_q;    // number of waiting bits
  logic               flush_q;       // the padded remainder leaves next
  logic [1:0]         raw_idx_q;     // raw blocks 1..3 are leaving (raw_q)
  logic               raw_sel_q;     // backup buffer being sent
  logic [1:0]         blk_q;         // compressed blocks sent for this line
  logic [TOTAL_W-1:0] line_len_q;

  field_t            f1, f2;
  logic [PAIR_W-1:0] pair;
  logic [PACK_W-1:0] pack_or;
  logic [8:0]        cnt_new;

  logic [PACK_W-1:0]  pack_d;
  logic [7:0]         pack_cnt_d;
  logic               flush_d, raw_d, raw_sel_d;
  logic [1:0]         raw_idx_d, blk_d;

  always_comb begin
    // code concatenators 1 and 2
    f1 = pack_field(s2_q.p1, s2_q.idx1, s2_q.w1);
    f2 = pack_field(s2_q.p2, s2_q.idx2, s2_q.w2);
    // barrel shifter 1: place word 2 right behind word 1
    pair = {f1, {FIELD_W{1'b0}}} | ({f2, {FIELD_W{1'b0}}} >> s2_q.len1);
    // barrel shifter 2 and OR gate: append the pair to the waiting bits
    pack_or = pack_q | ({pair, {BUS_W{1'b0}}} >> pack_cnt_q);
    cnt_new = 9'(pack_cnt_q) + 9'(s2_q.total_length);

    pack_d     = pack_q;
    pack_cnt_d = pack_cnt_q;
    flush_d    = 1'b0;
    raw_d      = raw_q;
    raw_idx_d  = raw_idx_q;
    raw_sel_d  = raw_sel_q;
    blk_d      = blk_q;

    out_valid = 1'b0;
    out_data  = '0;
    out_comp  = 1'b1;
    out_first = 1'b0;
    out_last  = 1'b0;
    out_len   = line_len_q;

    if (raw_q) begin
      // multiplexer array 2: backup buffer blocks 1..3
      out_valid = 1'b1;
      out_data  = backup_q[raw_sel_q][raw_idx_q*BUS_W +: BUS_W];
      out_comp  = 1'b0;
      out_last  = (raw_idx_q == 2'd3);
      out_len   = TOTAL_W'(LINE_BITS);
      raw_idx_d = raw_idx_q + 1'b1;
      raw_d     = (raw_idx_q != 2'd3);
    end else if (flush_q) begin
      // multiplexer array 3: zero-padded remainder
      out_valid  = 1'b1;
      out_data   = pack_q[PACK_W-1 -: BUS_W];
      out_first  = (blk_q == 2'd0);
      out_last   = 1'b1;
      pack_d     = '0;
      pack_cnt_d = '0;
      blk_d      = '0;
      // the first pair of the next line may arrive in the same cycle; it
      // starts the emptied packing register
      if (s2_q.valid) begin
        pack_d     = {pair, {BUS_W{1'b0}}};
        pack_cnt_d = 8'(s2_q.total_length);
      end
    end else if (s2_q.valid) begin
      if (s2_q.overflow) begin
        // the line does not shrink: send it as it is, block 0 now
        out_valid  = 1'b1;
        out_data   = backup_q[s2_q.bsel][0 +: BUS_W];
        out_comp   = 1'b0;
        out_first  = 1'b1;
        out_len    = TOTAL_W'(LINE_BITS);
        raw_d      = 1'b1;
        raw_idx_d  = 2'd1;
        raw_sel_d  = s2_q.bsel;
        pack_d     = '0;
        pack_cnt_d = '0;
        blk_d      = '0;
      end else if (cnt_new >= 9'(BUS_W)) begin
        out_valid  = 1'b1;
        out_data   = pack_or[PACK_W-1 -: BUS_W];
        out_first  = (blk_q == 2'd0);
        out_len    = s2_q.sum_total;
        pack_d     = pack_or << BUS_W;
        pack_cnt_d = 8'(cnt_new - 9'(BUS_W));
        blk_d      = blk_q + 1'b1;
        if (s2_q.last) begin
          if (cnt_new == 9'(BUS_W)) begin
            out_last   = 1'b1;
            blk_d      = '0;
          end else begin
            flush_d    = 1'b1;
          end
        end
      end else if (s2_q.last) begin
        // fill: the last, partly filled block, padded with zeros
        out_valid  = 1'b1;
        out_data   = pack_or[PACK_W-1 -: BUS_W];
        out_first  = (blk_q == 2'd0);
        out_last   = 1'b1;
        out_len    = s2_q.sum_total;
        pack_d     = '0;
        pack_cnt_d = '0;
        blk_d      = '0;
      end else begin
        pack_d     = pack_or;
        pack_cnt_d = cnt_new[7:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack_q     <= '0;
      pack_cnt_q <= '0;
      flush_q    <= 1'b0;
      raw_q      <= 1'b0;
      raw_idx_q  <= '0;
      raw_sel_q  <= 1'b0;
      blk_q      <= '0;
      line_len_q <= '0;
    end else begin
      pack_q     <= pack_d;
      pack_cnt_q <= pack_cnt_d;
      flush_q    <= flush_d;
      raw_q      <= raw_d;
      raw_idx_q  <= raw_idx_d;
      raw_sel_q  <= raw_sel_d;
      blk_q      <= blk_d;
      if (s2_q.valid && s2_q.last && !stall) line_len_q <= s2_q.sum_total;
    end
  end

  // only the first pair of the next line can meet a padded remainder
  a_flush_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (s2_q.valid && flush_q) |-> !s2_q.last);
  // fewer than one block's worth of bits is ever left waiting
  a_pack_bound: assert property (@(posedge clk) disable iff (!rst_n)
    pack_cnt_q < 8'(BUS_W));
  // a compressed line never needs more than four blocks
  a_block_count: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && out_comp && blk_q == 2'd3) |-> out_last);

endmodule
