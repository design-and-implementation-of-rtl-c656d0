// cpack_fifo_dict: the C-Pack FIFO dictionary.
//
// Holds the ENTRIES most recently pushed words of the current line (16 x 32
// bits = 64 bytes, the selected dictionary size) and shows all of them in
// parallel to the comparator arrays of the compressor or the decoders of the
// decompressor.  Replacement is first-in first-out, built as a shift
// register: a pushed word enters at entry 0, older words move up, and the
// oldest word drops out of the last entry.  Up to two words are pushed per
// clock, first word before second word, so after a double push entry 0 holds
// the second word and entry 1 the first.
//
// Interface: push1/word1 and push2/word2 are sampled at the rising clock edge;
// clear (line start) empties the dictionary to all-zero entries and takes
// priority over the pushes.  entries[] is the registered content, valid the
// cycle after the push.
//
// The FIFO policy, the size and the two-words-per-cycle update come from the
// scheme; the shift-register organisation, the push order within a cycle and
// the all-zero contents after clear are this design's choices.  The zero
// contents need no valid bits: compressor and decompressor both start from
// them, so a match against an unwritten entry decodes correctly.
module cpack_fifo_dict #(
  parameter int unsigned ENTRIES = cpack_pkg::DICT_ENTRIES,
  parameter int unsigned WORD_W  = cpack_pkg::WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              push1,
  input  logic [WORD_W-1:0] word1,
  input  logic              push2,
  input  logic [WORD_W-1:0] word2,
  output logic [WORD_W-1:0] entries [ENTRIES]
);

  logic [WORD_W-1:0] dict_q [ENTRIES];
  logic [WORD_W-1:0] dict_d [ENTRIES];

  always_comb begin
    dict_d = dict_q;
    if (clear) begin
      for (int i = 0; i < ENTRIES; i++) dict_d[i] = '0;
    end else if (push1 && push2) begin
      for (int i = ENTRIES - 1; i >= 2; i--) dict_d[i] = dict_q[i-2];
      dict_d[1] = word1;
      dict_d[0] = word2;
    end else if (push1 || push2) begin
      for (int i = ENTRIES - 1; i >= 1; i--) dict_d[i] = dict_q[i-1];
      dict_d[0] = push1 ? word1 : word2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) dict_q[i] <= '0;
    end else begin
      dict_q <= dict_d;
    end
  end

  assign entries = dict_q;

endmodule
