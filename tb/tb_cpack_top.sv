// tb_cpack_top: end-to-end testbench of the C-Pack compressed cache datapath,
// at the default parameters.
//
// Lines of mixed content go through the compressor back to back, one beat
// per cycle unless the compressor stalls behind a raw line.  Its blocks are stored
// in a model of one cache set, at the place the line locator picks; the
// locator's decision is checked against an exhaustive search over the set
// model, and the set model is then updated (partner, empty line, one or two
// evictions); lines also leave the set at random, and every twentieth line
// meets a set whose ways all hold two lines.  Each stored line is read back through the decompressor, with
// random idle cycles between blocks, and must come out as the original line.
// The compressed stream is also checked against the reference model.
//
// The mechanisms of the design are counted and each must occur: all six word
// patterns, a second word coded from the first word of its pair, the raw
// fallback, a trailing padded block, the compressor's stall behind a raw
// line, compressor input and output in the same cycle (overlapping lines),
// the decompressor waiting for input, uncompressed pass-through, and the
// four placements of the locator.
module tb_cpack_top;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int NLINES = 400;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               c_in_valid = 1'b0;
  logic               c_in_ready;
  logic [63:0]        c_in_data = '0;
  logic               c_out_valid, c_out_comp, c_out_first, c_out_last;
  logic [127:0]       c_out_data;
  logic [TOTAL_W-1:0] c_out_len;
  loc_way_t           set_ways [8];
  logic               loc_valid;
  logic [2:0]         loc_way;
  logic               loc_slot;
  logic [1:0]         loc_evict;
  loc_action_e        loc_action;
  logic               d_in_valid = 1'b0;
  logic               d_in_ready;
  logic [127:0]       d_in_data = '0;
  logic               d_in_comp = 1'b0;
  logic [8:0]         d_in_len = '0;
  logic               d_out_valid, d_out_last, d_code_err;
  logic [127:0]       d_out_data;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_pat [6] = '{0, 0, 0, 0, 0, 0};
  int n_pair_hit = 0, n_raw = 0, n_flush = 0, n_wait = 0, n_pass = 0;
  int n_stall = 0, n_overlap = 0;
  int n_act [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cpack_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // a stored line: its blocks as the compressor sent them
  typedef struct {
    logic [511:0] orig;
    logic [511:0] blocks;
    int           nblk;
    bit           comp;
    int           len;
  } stored_t;

  logic [511:0] orig_q [$];     // lines sent, in order
  cres_t        ref_q [$];
  stored_t      rd_q [$];       // lines to read back

  // the set model
  loc_way_t set_q [8];
  assign set_ways = set_q;

  // -------------------------------------------------------- compressor side
  initial begin
    line_t        w;
    cres_t        r;
    logic [511:0] flat;
    for (int i = 0; i < 8; i++) set_q[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NLINES; n++) begin
      w = make_line((n % 10 == 9) ? 2 : (n % 3 == 0) ? 0 : (n % 5 == 2) ? 1 : 3);
      r = compress(w);
      for (int i = 0; i < 16; i++) flat[32*i +: 32] = w[i];
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        c_in_valid = 1'b0;
        while (!c_in_ready) @(negedge clk);
        c_in_valid = 1'b1;
        c_in_data  = flat[64*b +: 64];
        if (b == 0) begin
          orig_q.push_back(flat);
          ref_q.push_back(r);
        end
      end
      // now and then the line goes to a set whose ways all hold two lines
      if (n % 20 == 19)
        for (int i = 0; i < 8; i++) begin
          set_q[i].valid   = 2'b11;
          set_q[i].size[0] = 10'($urandom_range(60, 250));
          set_q[i].size[1] = 10'($urandom_range(60, 250));
        end
    end
    @(negedge clk);
    c_in_valid = 1'b0;
  end

  // collect the compressor's blocks, check them against the reference
  initial begin
    stored_t s;
    cres_t   r;
    int      blk;
    wait (rst_n);
    for (int n = 0; n < NLINES; n++) begin
      s.blocks = '0;
      blk = 0;
      forever begin
        do @(posedge clk); while (!c_out_valid);
        if (c_out_first) blk = 0;
        s.blocks[128*blk +: 128] = c_out_data;
        blk++;
        if (c_out_last) break;
      end
      wait (orig_q.size() > 0);
      s.orig = orig_q.pop_front();
      r      = ref_q.pop_front();
      s.nblk = blk;
      s.comp = c_out_comp;
      s.len  = int'(c_out_len);
      n_pat[0] += r.n_zzzz; n_pat[1] += r.n_zzzx; n_pat[2] += r.n_mmmm;
      n_pat[3] += r.n_mmmx; n_pat[4] += r.n_mmxx; n_pat[5] += r.n_xxxx;
      n_pair_hit += r.n_pair_hit;
      if (r.len >= 512) begin
        n_raw++;
        check(!s.comp && s.nblk == 4 && s.blocks == s.orig, "raw line stored");
      end else begin
        check(s.comp && s.len == r.len && s.nblk == (r.len + 127) / 128,
              "compressed length and blocks");
        for (int j = 0; j < s.nblk; j++)
          check(s.blocks[128*j +: 128] == block(r, j), "compressed block");
        if (s.nblk - r.len14 / 128 == 2) n_flush++;
      end
      rd_q.push_back(s);
    end
  end

  // ---------------------------------------------------------- line locator
  always @(posedge clk) begin
    exp_t        e;
    loc_action_e act;
    int          sz;
    if (rst_n && c_out_valid && c_out_last) begin
      e  = loc_search(set_q, int'(c_out_len));
      sz = int'(c_out_len);
      // the decision is due two cycles later
      fork
        begin
          repeat (2) @(posedge clk);
          checks++;
          if (!(loc_valid && loc_way == e.way && loc_slot == e.slot &&
                loc_evict == e.evict && loc_action == loc_action_e'(e.action))) begin
            failures++;
            $display("FAIL locator at cycle %0d", cycle);
          end
          n_act[e.action]++;
          for (int s = 0; s < 2; s++)
            if (e.evict[s]) set_q[e.way].valid[s] = 1'b0;
          set_q[e.way].valid[e.slot] = 1'b1;
          set_q[e.way].size[e.slot]  = 10'(sz);
          // lines also leave the set (written back or invalidated)
          if ($urandom_range(0, 2) == 0) set_q[$urandom_range(0, 7)].valid[$urandom_range(0, 1)] = 1'b0;
          if ($urandom_range(0, 29) == 0) set_q[$urandom_range(0, 7)] = '0;
        end
      join_none
    end
  end

  // compressor stalls behind raw lines; lines overlapping in the compressor
  always @(negedge clk)
    if (rst_n) begin
      if (!c_in_ready) n_stall++;
      if (c_in_valid && c_in_ready && c_out_valid) n_overlap++;
    end

  // ------------------------------------------------------ decompressor side
  always @(negedge clk)
    if (rst_n && dut.u_decomp.state_q == dut.u_decomp.DECODE && !dut.u_decomp.can_decode)
      n_wait++;

  initial begin
    stored_t s;
    wait (rst_n);
    for (int n = 0; n < NLINES; n++) begin
      wait (rd_q.size() > 0);
      s = rd_q[0];
      for (int b = 0; b < s.nblk; b++) begin
        @(negedge clk);
        d_in_valid = 1'b0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
        while (!d_in_ready) @(negedge clk);
        d_in_valid = 1'b1;
        d_in_data  = s.blocks[128*b +: 128];
        d_in_comp  = s.comp;
        d_in_len   = s.comp ? 9'(s.len) : 9'd0;
        if (!s.comp && b == 0) n_pass++;
      end
      @(negedge clk);
      d_in_valid = 1'b0;
      // wait for the line to come out before the next one
      while (rd_q.size() > 0 && rd_q[0].orig === s.orig && !done_line) @(negedge clk);
      done_line = 1'b0;
    end
  end

  bit done_line = 1'b0;
  int lines_out = 0;

  always @(posedge clk) begin
    stored_t     s;
    static int   j = 0;
    if (rst_n && d_out_valid) begin
      s = rd_q[0];
      check(d_out_data == s.orig[128*j +: 128], $sformatf("line %0d block %0d read back", lines_out, j));
      check(d_out_last == (j == 3), "read back last flag");
      check(!d_code_err, "no code error");
      j++;
      if (j == 4) begin
        j = 0;
        void'(rd_q.pop_front());
        lines_out++;
        done_line = 1'b1;
      end
    end
  end

  initial begin
    wait (lines_out == NLINES);
    repeat (5) @(posedge clk);
    for (int p = 0; p < 6; p++) check(n_pat[p] > 0, $sformatf("pattern %0d seen", p));
    for (int a = 0; a < 4; a++) check(n_act[a] > 0, $sformatf("placement %0d seen", a));
    check(n_pair_hit > 0, "second word coded from the first");
    check(n_raw > 0, "raw fallback");
    check(n_flush > 0, "padded trailing block");
    check(n_wait > 0, "decompressor waited for input");
    check(n_pass > 0, "uncompressed pass-through");
    check(n_stall > 0 && n_stall == 3 * n_raw, "compressor stalls only behind raw lines");
    check(n_overlap > 0, "lines overlap in the compressor");
    $display("patterns zzzz=%0d zzzx=%0d mmmm=%0d mmmx=%0d mmxx=%0d xxxx=%0d pair_hits=%0d",
             n_pat[0], n_pat[1], n_pat[2], n_pat[3], n_pat[4], n_pat[5], n_pair_hit);
    $display("raw=%0d flush=%0d decomp_wait=%0d pass=%0d comp_stall=%0d overlap=%0d",
             n_raw, n_flush, n_wait, n_pass, n_stall, n_overlap);
    $display("locator empty=%0d partner=%0d evict_one=%0d evict_two=%0d",
             n_act[0], n_act[1], n_act[2], n_act[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog lines_out=%0d", lines_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
