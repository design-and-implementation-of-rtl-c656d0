// cpack_decompressor: C-Pack line decompressor, two words per cycle.
//
// A compressed line arrives as 128-bit blocks, the width of the L2 bus, with
// its compressed length in bits (input_len) and a compression flag given
// alongside the first block.  The blocks are gathered in a 196-bit input
// buffer, left aligned.  Each cycle the two decoders read the two compressed
// words at the top of the buffer: decoder 1 at bit 0, decoder 2 right behind
// the first word's length.  Decoder 2 sees the first word as dictionary entry
// 0 whenever the first word enters the dictionary, mirroring the compressor.
// The buffer is then shifted left by the pair's total length.  Because a
// compressed word may straddle two blocks, a pair is only decoded while at
// least 68 bits (two longest words) wait in the buffer, or the whole line has
// been read; whenever fewer than 68 bits would remain, the next block is
// shifted in behind them in the same cycle.  Two decoded pairs make one
// 128-bit output block: the first pair waits in a 64-bit register, the
// second completes the block.
//
// A line sent uncompressed (comp_flag low) passes through unchanged, four
// blocks.
//
// Interface: in_valid/in_ready on the input blocks; in_comp and in_len are
// read with the first block of each line (any block accepted while idle).
// The output has no back-pressure: out_valid for one cycle per block, out_last
// on the fourth.  Output block j holds words 4j..4j+3, word 4j in bits [31:0].
// code_err pulses when a field holds the unused code 1111.
//
// Timing: the first block is loaded in the cycle it is accepted; one pair is
// decoded in each of the next eight cycles if blocks keep up, and each output
// block leaves in the cycle its second pair is decoded (combinationally from
// the decoders).  So the last block leaves 8 cycles after the first block is
// accepted.  A raw line's blocks pass straight through in the cycle they arrive.
// Lines follow each other without a gap: the first block of a compressed line
// is taken in the cycle the previous line's last pair is decoded, so a new
// line can start every 8 cycles (64 output bits per cycle).  In that cycle
// in_ready follows in_comp: a raw line waits one cycle, since its first block
// would leave in the same cycle as the previous line's last block.
//
// From the scheme: two words per cycle, the code table, the FIFO dictionary,
// the 68-bit refill rule, the 128-bit blocks, the 9-bit input length and the
// compression flag that bypasses decoding.  This design's own choices: the
// handshake, loading in the same cycle as decoding, starting the next line
// with the last pair of the previous one, and the treatment of the unused
// code.
module cpack_decompressor
  import cpack_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // input blocks
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [BUS_W-1:0]     in_data,
  input  logic                 in_comp,   // comp_flag, with the first block
  input  logic [8:0]           in_len,    // input_len, with the first block
  // output blocks
  output logic                 out_valid,
  output logic [BUS_W-1:0]     out_data,
  output logic                 out_last,
  output logic                 code_err
);

  localparam int unsigned BUF_W = BUS_W + PAIR_W;   // 196
  localparam int unsigned PAIRS = LINE_WORDS / 2;   // 8

  typedef enum logic [1:0] {IDLE, DECODE, PASS} state_e;

  state_e             state_q, state_d;
  logic [BUF_W-1:0]   buf_q, buf_d;        // register array 1
  logic [7:0]         cnt_q, cnt_d;        // bits waiting in the buffer
  logic [8:0]         rem_q, rem_d;        // bits of the line not yet loaded
  logic [3:0]         pairs_q, pairs_d;    // pairs still to decode
  logic               left_flag_q, left_flag_d;
  logic [63:0]        reg3_q, reg3_d;      // register array 3: first pair
  logic [1:0]         raw_q, raw_d;        // raw blocks passed

  word_t              dict [DICT_ENTRIES];
  word_t              dict2 [DICT_ENTRIES];
  word_t              first_word, second_word;
  logic [LEN_W-1:0]   first_len, second_len;
  logic               first_push, second_push, first_ok, second_ok;
  field_t             first_field, second_field;
  logic [PAIR_W-1:0]  pair_bits, pair_shift;
  logic [7:0]         total_length;
  logic               line_flag;           // more of the line is to be loaded
  logic               can_decode;
  logic               shift_flag;          // shift a new block in
  logic [BUF_W-1:0]   eff_buf;
  logic [7:0]         eff_cnt;
  logic               fire;

  // unpacker: the two fields at the top of the buffer
  assign pair_bits    = buf_q[BUF_W-1 -: PAIR_W];
  assign first_field  = pair_bits[PAIR_W-1 -: FIELD_W];
  assign pair_shift   = pair_bits << first_len;
  assign second_field = pair_shift[PAIR_W-1 -: FIELD_W];

  cpack_word_decoder u_dec1 (
    .field   (first_field),
    .dict    (dict),
    .word    (first_word),
    .len     (first_len),
    .push    (first_push),
    .code_ok (first_ok)
  );

  always_comb begin
    if (first_push) begin
      dict2[0] = first_word;
      for (int i = 1; i < DICT_ENTRIES; i++) dict2[i] = dict[i-1];
    end else begin
      dict2 = dict;
    end
  end

  cpack_word_decoder u_dec2 (
    .field   (second_field),
    .dict    (dict2),
    .word    (second_word),
    .len     (second_len),
    .push    (second_push),
    .code_ok (second_ok)
  );

  cpack_fifo_dict u_dict (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (can_decode && pairs_q == 4'd1),
    .push1   (can_decode && first_push),
    .word1   (first_word),
    .push2   (can_decode && second_push),
    .word2   (second_word),
    .entries (dict)
  );

  assign total_length = 8'(first_len) + 8'(second_len);
  assign line_flag    = (rem_q != '0);
  assign can_decode   = (state_q == DECODE) && (cnt_q >= 8'(PAIR_W) || !line_flag);
  assign code_err     = can_decode && !(first_ok && second_ok);

  always_comb begin
    // what is left after this cycle's pair, if one is decoded
    if (can_decode) begin
      eff_buf = buf_q << total_length;
      eff_cnt = (total_length > cnt_q) ? 8'd0 : cnt_q - total_length;
    end else begin
      eff_buf = buf_q;
      eff_cnt = cnt_q;
    end
    case (state_q)
      IDLE:    shift_flag = 1'b1;
      // while the line is loading: refill below 68 bits; once it is all
      // in: a compressed next line may start as the last pair is decoded
      DECODE:  shift_flag = line_flag ? (eff_cnt < 8'(PAIR_W))
                                      : (can_decode && pairs_q == 4'd1 && in_comp);
      PASS:    shift_flag = 1'b1;
      default: shift_flag = 1'b0;
    endcase
  end

  assign in_ready = shift_flag;
  assign fire     = in_valid && in_ready;

  always_comb begin
    state_d     = state_q;
    buf_d       = buf_q;
    cnt_d       = cnt_q;
    rem_d       = rem_q;
    pairs_d     = pairs_q;
    left_flag_d = left_flag_q;
    reg3_d      = reg3_q;
    raw_d       = raw_q;
    out_valid   = 1'b0;
    out_data    = '0;
    out_last    = 1'b0;

    case (state_q)
      IDLE: begin
        if (fire) begin
          if (in_comp) begin
            state_d     = DECODE;
            buf_d       = {in_data, {PAIR_W{1'b0}}};
            cnt_d       = 8'(BUS_W);
            rem_d       = (in_len > 9'(BUS_W)) ? in_len - 9'(BUS_W) : '0;
            pairs_d     = 4'(PAIRS);
            left_flag_d = 1'b0;
          end else begin
            // multiplexer 1: uncompressed line, block 0
            state_d   = PASS;
            raw_d     = 2'd1;
            out_valid = 1'b1;
            out_data  = in_data;
          end
        end
      end
      PASS: begin
        if (fire) begin
          out_valid = 1'b1;
          out_data  = in_data;
          raw_d     = raw_q + 1'b1;
          if (raw_q == 2'd3) begin
            out_last = 1'b1;
            state_d  = IDLE;
          end
        end
      end
      DECODE: begin
        buf_d = eff_buf;
        cnt_d = eff_cnt;
        if (fire && line_flag) begin
          // barrel shifter 2 and OR gate: new block behind the waiting bits
          buf_d = eff_buf | ({in_data, {PAIR_W{1'b0}}} >> eff_cnt);
          cnt_d = eff_cnt + 8'(BUS_W);
          rem_d = (rem_q > 9'(BUS_W)) ? rem_q - 9'(BUS_W) : '0;
        end
        if (can_decode) begin
          pairs_d = pairs_q - 1'b1;
          if (!left_flag_q) begin
            reg3_d      = {second_word, first_word};
            left_flag_d = 1'b1;
          end else begin
            // output_flag: a whole block is ready
            out_valid   = 1'b1;
            out_data    = {second_word, first_word, reg3_q};
            out_last    = (pairs_q == 4'd1);
            left_flag_d = 1'b0;
          end
          if (pairs_q == 4'd1) state_d = IDLE;
        end
        if (fire && !line_flag) begin
          // the next line's first block, taken with this line's last pair
          state_d     = DECODE;
          buf_d       = {in_data, {PAIR_W{1'b0}}};
          cnt_d       = 8'(BUS_W);
          rem_d       = (in_len > 9'(BUS_W)) ? in_len - 9'(BUS_W) : '0;
          pairs_d     = 4'(PAIRS);
          left_flag_d = 1'b0;
        end
      end
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= IDLE;
      buf_q       <= '0;
      cnt_q       <= '0;
      rem_q       <= '0;
      pairs_q     <= '0;
      left_flag_q <= 1'b0;
      reg3_q      <= '0;
      raw_q       <= '0;
    end else begin
      state_q     <= state_d;
      buf_q       <= buf_d;
      cnt_q       <= cnt_d;
      rem_q       <= rem_d;
      pairs_q     <= pairs_d;
      left_flag_q <= left_flag_d;
      reg3_q      <= reg3_d;
      raw_q       <= raw_d;
    end
  end

  // the buffer never overflows: a block is only added behind fewer than 68 bits
  a_buffer_bound: assert property (@(posedge clk) disable iff (!rst_n)
    cnt_q <= 8'(BUF_W));

endmodule
