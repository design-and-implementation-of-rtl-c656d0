// cpack_word_decoder: one C-Pack word decoder with its length generator.
//
// Reads the code at the top of a left-aligned 34-bit field, works out the
// word's coded length, and rebuilds the 32-bit word from zeros, the literal
// bytes in the field and, for a dictionary match, the upper bytes of the
// dictionary entry the field's 4-bit index selects.  push says whether the
// word enters the dictionary (every word but zzzz and zzzx).  code_ok is low
// for the unused code 1111; such a field is taken as 4 bits long and gives a
// zero word.  Purely combinational.
//
// The code table and the rebuild rules follow the scheme; the treatment of the
// unused code is this design's choice.
module cpack_word_decoder
  import cpack_pkg::*;
(
  input  field_t           field,
  input  word_t            dict [DICT_ENTRIES],
  output word_t            word,
  output logic [LEN_W-1:0] len,
  output logic             push,
  output logic             code_ok
);

  pat_e pat;
  idx_t idx;
  logic ok;

  always_comb begin
    pat     = field_pat(field, ok);
    code_ok = ok;
    // a two-bit code puts the index right behind it, a four-bit code two
    // bits later
    idx     = (pat == PAT_MMMM) ? field[31:28] : field[29:26];
    case (pat)
      PAT_ZZZZ: word = '0;
      PAT_XXXX: word = field[31:0];
      PAT_MMMM: word = dict[idx];
      PAT_MMXX: word = {dict[idx][31:16], field[25:10]};
      PAT_ZZZX: word = {24'h0, field[29:22]};
      PAT_MMMX: word = {dict[idx][31:8], field[25:18]};
      default:  word = '0;
    endcase
    if (!ok) word = '0;
    len  = ok ? pat_len(pat) : LEN_W'(4);
    push = ok && (pat != PAT_ZZZZ) && (pat != PAT_ZZZX);
  end

endmodule
