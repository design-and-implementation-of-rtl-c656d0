// cpack_pkg: constants, types and the word code of the C-Pack cache line
// compression scheme, shared by the compressor and the decompressor.
//
// C-Pack codes each 32-bit word of a 64-byte line either as a static pattern
// (all-zero word, or a word whose upper three bytes are zero) or against a
// 16-entry FIFO dictionary of recently seen words (full match, upper three
// bytes match, upper two bytes match), falling back to the literal word.
// The six codes, their outputs and lengths follow the pattern table of the
// scheme:
//
//   code  pattern  output               length
//   00    zzzz     00                    2
//   01    xxxx     01 BBBB              34
//   10    mmmm     10 iiii               6
//   1100  mmxx     1100 iiii BB         24
//   1101  zzzx     1101 B               12
//   1110  mmmx     1110 iiii B          16
//
// (z = zero byte, m = byte matched against a dictionary entry, x = unmatched
// byte, iiii = 4-bit dictionary index, B = literal byte.)  Patterns are
// written most significant byte first, so "zzzx" keeps the low byte and
// "mmxx" takes the upper two bytes from the dictionary.  Code 1111 is unused.
//
// A compressed word is held in a 34-bit field, left aligned: its first bit
// (the code's first bit) is bit 33 and unused low bits are zero.  A line's
// compressed stream is the concatenation of its words' fields, first word
// first, sent most significant bit first in 128-bit blocks.
package cpack_pkg;

  localparam int unsigned WORD_W       = 32;   // bits per word
  localparam int unsigned LINE_BYTES   = 64;   // cache line size
  localparam int unsigned LINE_BITS    = LINE_BYTES * 8;
  localparam int unsigned LINE_WORDS   = LINE_BITS / WORD_W;   // 16
  localparam int unsigned DICT_BYTES   = 64;   // selected dictionary size
  localparam int unsigned DICT_ENTRIES = DICT_BYTES * 8 / WORD_W; // 16
  localparam int unsigned IDX_W        = $clog2(DICT_ENTRIES);  // 4
  localparam int unsigned BUS_W        = 128;  // L1/L2 bus, block width
  localparam int unsigned FIELD_W      = 34;   // longest compressed word
  localparam int unsigned PAIR_W       = 2 * FIELD_W;  // 68
  localparam int unsigned LEN_W        = 6;    // length of one word, 2..34
  localparam int unsigned PAIR_LEN_W   = 7;    // length of two words, 4..68
  localparam int unsigned TOTAL_W      = 10;   // line length in bits, up to 544

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [FIELD_W-1:0] field_t;
  typedef logic [IDX_W-1:0] idx_t;

  // Pattern of one word.
  typedef enum logic [2:0] {
    PAT_ZZZZ = 3'd0,
    PAT_XXXX = 3'd1,
    PAT_MMMM = 3'd2,
    PAT_MMXX = 3'd3,
    PAT_ZZZX = 3'd4,
    PAT_MMMX = 3'd5
  } pat_e;

  // Codes of the pattern table.
  localparam logic [1:0] CODE_ZZZZ = 2'b00;
  localparam logic [1:0] CODE_XXXX = 2'b01;
  localparam logic [1:0] CODE_MMMM = 2'b10;
  localparam logic [3:0] CODE_MMXX = 4'b1100;
  localparam logic [3:0] CODE_ZZZX = 4'b1101;
  localparam logic [3:0] CODE_MMMX = 4'b1110;

  // Length in bits of a word coded with pattern p.
  function automatic logic [LEN_W-1:0] pat_len(pat_e p);
    case (p)
      PAT_ZZZZ: return 6'd2;
      PAT_XXXX: return 6'd34;
      PAT_MMMM: return 6'd6;
      PAT_MMXX: return 6'd24;
      PAT_ZZZX: return 6'd12;
      PAT_MMMX: return 6'd16;
      default:  return 6'd2;
    endcase
  endfunction

  // Number of leading (most significant) bytes of a that equal those of b,
  // reduced to the counts the codes can use: 4, 3, 2 or 0.
  function automatic logic [2:0] match_bytes(word_t a, word_t b);
    if (a == b) return 3'd4;
    else if (a[31:8] == b[31:8]) return 3'd3;
    else if (a[31:16] == b[31:16]) return 3'd2;
    else return 3'd0;
  endfunction

  // Code concatenator: the left-aligned field for word w with pattern p and
  // dictionary index idx.
  function automatic field_t pack_field(pat_e p, idx_t idx, word_t w);
    field_t f;
    f = '0;
    case (p)
      PAT_ZZZZ: f[33:32] = CODE_ZZZZ;
      PAT_XXXX: f = {CODE_XXXX, w};
      PAT_MMMM: f[33:28] = {CODE_MMMM, idx};
      PAT_MMXX: f[33:10] = {CODE_MMXX, idx, w[15:0]};
      PAT_ZZZX: f[33:22] = {CODE_ZZZX, w[7:0]};
      PAT_MMMX: f[33:18] = {CODE_MMMX, idx, w[7:0]};
      default:  f = '0;
    endcase
    return f;
  endfunction

  // Pattern of a left-aligned field, read from its code bits.  Sets valid to
  // 0 for the unused code 1111.
  function automatic pat_e field_pat(field_t f, output logic valid);
    valid = 1'b1;
    case (f[33:32])
      CODE_ZZZZ: return PAT_ZZZZ;
      CODE_XXXX: return PAT_XXXX;
      CODE_MMMM: return PAT_MMMM;
      default: begin
        case (f[31:30])
          2'b00:   return PAT_MMXX;
          2'b01:   return PAT_ZZZX;
          2'b10:   return PAT_MMMX;
          default: begin
            valid = 1'b0;
            return PAT_ZZZZ;
          end
        endcase
      end
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Pair-matching compressed cache: what the line locator sees of one
  // physical line of a set (up to two compressed lines, each with its size in
  // bits, 512 for a line stored uncompressed) and what it decides.
  typedef struct packed {
    logic [1:0]                 valid;   // slot holds a compressed line
    logic [1:0][TOTAL_W-1:0]    size;    // its size in bits
  } loc_way_t;

  typedef enum logic [1:0] {
    LOC_EMPTY     = 2'd0,   // placed in an empty physical line
    LOC_PARTNER   = 2'd1,   // placed beside a partner, nothing evicted
    LOC_EVICT_ONE = 2'd2,   // one compressed line evicted
    LOC_EVICT_TWO = 2'd3    // both lines of a physical line evicted
  } loc_action_e;

endpackage
