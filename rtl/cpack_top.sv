// cpack_top: the C-Pack hardware of one pair-matching compressed L2 cache.
//
// Three units sit between the L1/L2 bus and the L2 data arrays:
//   - the compressor takes a 64-byte line as eight 64-bit beats and returns it
//     as 128-bit blocks, compressed or, if it does not shrink, as it is;
//   - the line locator decides, as soon as the compressor reports the line's
//     final size, where in its set the line goes: beside a partner line, in
//     an empty line, or in place of one or two evicted compressed lines;
//   - the decompressor takes a stored line back as 128-bit blocks with its
//     length and compression flag and returns the 64-byte line as four
//     128-bit blocks.
// The L2 tag and data arrays and the cache controller are not part of this
// design: the set state the locator reads (set_ways) and the blocks to store
// and to read back are ports.
//
// Timing: compressor at most 13 cycles per line, decompressor 8 cycles after
// the first block, locator 2 cycles after the compressor's last block.
module cpack_top
  import cpack_pkg::*;
#(
  parameter int unsigned WAYS = 8    // L2 associativity
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // compressor: uncompressed line in
  input  logic                    c_in_valid,
  output logic                    c_in_ready,
  input  logic [2*WORD_W-1:0]     c_in_data,
  // compressor: blocks to store
  output logic                    c_out_valid,
  output logic [BUS_W-1:0]        c_out_data,
  output logic                    c_out_comp,
  output logic                    c_out_first,
  output logic                    c_out_last,
  output logic [TOTAL_W-1:0]      c_out_len,
  // locator: state of the target set, and its decision
  input  loc_way_t                set_ways [WAYS],
  output logic                    loc_valid,
  output logic [$clog2(WAYS)-1:0] loc_way,
  output logic                    loc_slot,
  output logic [1:0]              loc_evict,
  output loc_action_e             loc_action,
  // decompressor: stored blocks in
  input  logic                    d_in_valid,
  output logic                    d_in_ready,
  input  logic [BUS_W-1:0]        d_in_data,
  input  logic                    d_in_comp,
  input  logic [8:0]              d_in_len,
  // decompressor: line out
  output logic                    d_out_valid,
  output logic [BUS_W-1:0]        d_out_data,
  output logic                    d_out_last,
  output logic                    d_code_err
);

  cpack_compressor u_comp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c_in_valid),
    .in_ready  (c_in_ready),
    .in_data   (c_in_data),
    .out_valid (c_out_valid),
    .out_data  (c_out_data),
    .out_comp  (c_out_comp),
    .out_first (c_out_first),
    .out_last  (c_out_last),
    .out_len   (c_out_len)
  );

  // the line's final size is known with its last block
  pair_locator #(
    .WAYS      (WAYS),
    .LINE_SIZE (LINE_BITS)
  ) u_loc (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_valid  (c_out_valid && c_out_last),
    .req_size   (c_out_len),
    .ways       (set_ways),
    .rsp_valid  (loc_valid),
    .rsp_way    (loc_way),
    .rsp_slot   (loc_slot),
    .rsp_evict  (loc_evict),
    .rsp_action (loc_action)
  );

  cpack_decompressor u_decomp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (d_in_valid),
    .in_ready  (d_in_ready),
    .in_data   (d_in_data),
    .in_comp   (d_in_comp),
    .in_len    (d_in_len),
    .out_valid (d_out_valid),
    .out_data  (d_out_data),
    .out_last  (d_out_last),
    .code_err  (d_code_err)
  );

endmodule
