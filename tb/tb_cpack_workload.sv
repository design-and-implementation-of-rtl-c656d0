// tb_cpack_workload: compression-ratio workload for the C-Pack datapath at
// its default parameters, on synthetic cache data.
//
// Real cache traces are not part of this repository, so the testbench makes
// lines whose words follow the pattern mix measured on L2 cache data for
// this scheme: zzzz 39.7 %, xxxx 32.1 %, mmmm 7.6 %, mmxx 6.1 %, zzzx 7.3 %,
// mmmx 7.2 %.  Dictionary patterns are made by reusing or altering a word
// pushed earlier in the same line.  Lines go through the compressor back to
// back; every block is checked against the reference coder, and the share of
// each pattern the reference actually codes must come within 3 points of the
// target mix.
//
// Each compressed line then goes to a random set of a pair-matching cache of
// 8-way sets and 64-byte lines, placed where the locator says; each decision
// is checked against an exhaustive search.  Two cache sizes are run one
// after the other, 64 KB (128 sets) and 2 MB (4096 sets), each with 2.5
// lines sent per physical line.  At the end of each the testbench reports
// the raw compression ratio (compressed bits over original bits, a raw line
// counting 512), the effective system-wide compression ratio (a line alone
// in a physical line counts 100 %, a line sharing one 50 %, averaged over
// the resident lines), and how often two lines had to be evicted.
module tb_cpack_workload;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int NSIZES   = 2;
  localparam int MAXSETS  = 4096;
  localparam int SETS [NSIZES] = '{128, 4096};
  // target mix, in tenths of a percent: zzzz, zzzx, mmmm, mmmx, mmxx, xxxx
  localparam int MIX [6] = '{397, 73, 76, 72, 61, 321};

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

  // a line with the target pattern mix
  function automatic line_t mix_line();
    line_t       w;
    logic [31:0] pushed [$];
    logic [31:0] base;
    int          r, sel;
    for (int k = 0; k < 16; k++) begin
      r = $urandom_range(0, 999);
      sel = 0;
      for (int p = 0; p < 6; p++) begin
        if (r < MIX[p]) begin sel = p; break; end
        r -= MIX[p];
      end
      if (sel >= 2 && sel <= 4 && pushed.size() == 0) sel = 5;
      if (sel >= 2 && sel <= 4)
        base = pushed[$urandom_range(0, pushed.size() - 1)];
      case (sel)
        0: w[k] = 32'h0;
        1: w[k] = 32'($urandom_range(1, 255));
        2: w[k] = base;
        3: w[k] = {base[31:8], base[7:0] ^ 8'($urandom_range(1, 255))};
        4: w[k] = {base[31:16], base[15:8] ^ 8'($urandom_range(1, 255)), 8'($urandom)};
        default: w[k] = $urandom | 32'h0001_0000;
      endcase
      if (sel >= 2) begin
        pushed.push_front(w[k]);
        if (pushed.size() > 16) void'(pushed.pop_back());
      end
    end
    return w;
  endfunction

  // the cache model
  loc_way_t sets [MAXSETS][8];
  int       set_q [$];       // set of each line, in output order
  int       cur_set = 0;
  int       nsets = 128;
  int       line_lens [$];   // lengths used for the raw ratio

  always_comb
    for (int i = 0; i < 8; i++) set_ways[i] = sets[cur_set][i];

  cres_t ref_q [$];
  int    n_pat [6] = '{0, 0, 0, 0, 0, 0};
  int    n_act [4] = '{0, 0, 0, 0};
  int    n_req = 0;
  int    run_lines = 0, lines_done = 0;

  // ---------------------------------------------------------------- driver
  initial begin
    line_t        w;
    logic [511:0] flat;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int sz = 0; sz < NSIZES; sz++) begin
      // empty cache of this size; all earlier lines have been placed
      wait (lines_done == run_lines);
      repeat (4) @(negedge clk);
      nsets = SETS[sz];
      for (int s = 0; s < MAXSETS; s++)
        for (int i = 0; i < 8; i++) sets[s][i] = '0;
      for (int a = 0; a < 4; a++) n_act[a] = 0;
      n_req = 0;
      line_lens.delete();
      run_lines = lines_done + nsets * 8 * 5 / 2;
      while (ref_q.size() + lines_done < run_lines) begin
        w = mix_line();
        for (int i = 0; i < 16; i++) flat[32*i +: 32] = w[i];
        for (int b = 0; b < 8; b++) begin
          @(negedge clk);
          c_in_valid = 1'b0;
          while (!c_in_ready) @(negedge clk);
          c_in_valid = 1'b1;
          c_in_data  = flat[64*b +: 64];
          if (b == 0) begin
            ref_q.push_back(compress(w));
            set_q.push_back($urandom_range(0, nsets - 1));
            if (set_q.size() == 1) cur_set = set_q[0];
          end
        end
      end
      @(negedge clk);
      c_in_valid = 1'b0;
      wait (lines_done == run_lines);
      repeat (4) @(negedge clk);
      report(sz);
    end
    for (int p = 0; p < 6; p++) begin
      int tot;
      tot = n_pat[0] + n_pat[1] + n_pat[2] + n_pat[3] + n_pat[4] + n_pat[5];
      check(n_pat[p] * 1000 > (MIX[p] - 30) * tot && n_pat[p] * 1000 < (MIX[p] + 30) * tot,
            $sformatf("pattern %0d share %0d/%0d, target %0d per mille", p, n_pat[p], tot, MIX[p]));
    end
    $display("pattern shares (per mille): zzzz=%0d zzzx=%0d mmmm=%0d mmmx=%0d mmxx=%0d xxxx=%0d",
             pm(n_pat[0]), pm(n_pat[1]), pm(n_pat[2]), pm(n_pat[3]), pm(n_pat[4]), pm(n_pat[5]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pm(int n);
    int tot;
    tot = n_pat[0] + n_pat[1] + n_pat[2] + n_pat[3] + n_pat[4] + n_pat[5];
    return (tot == 0) ? 0 : n * 1000 / tot;
  endfunction

  task automatic report(int sz);
    longint bits;
    int     used_ways, resident;
    bits = 0;
    foreach (line_lens[i]) bits += longint'(line_lens[i]);
    used_ways = 0;
    resident = 0;
    for (int s = 0; s < nsets; s++)
      for (int i = 0; i < 8; i++) begin
        if (sets[s][i].valid != 2'b00) used_ways++;
        resident += int'(sets[s][i].valid[0]) + int'(sets[s][i].valid[1]);
      end
    check(resident > used_ways, "lines share physical lines");
    check(n_req == line_lens.size(), "one placement per line");
    $display("cache %0d KB (%0d sets x 8 ways): lines=%0d raw ratio=%0d.%01d %% effective ratio=%0d.%01d %% two-line evictions=%0d of %0d",
             nsets * 8 * 64 / 1024, nsets, line_lens.size(),
             int'(bits * 100 / (512 * line_lens.size())),
             int'(bits * 1000 / (512 * line_lens.size())) % 10,
             used_ways * 100 / resident, (used_ways * 1000 / resident) % 10,
             n_act[3], n_req);
    $display("  placements: empty=%0d partner=%0d evict_one=%0d evict_two=%0d",
             n_act[0], n_act[1], n_act[2], n_act[3]);
  endtask

  // ------------------------------------------ compressor output and locator
  initial begin
    cres_t r;
    int    blk;
    bit    comp;
    wait (rst_n);
    forever begin
      blk = 0;
      forever begin
        do @(posedge clk); while (!c_out_valid);
        if (c_out_first) blk = 0;
        comp = c_out_comp;
        if (comp) begin
          wait (ref_q.size() > 0);
          check(c_out_data == block(ref_q[0], blk), "compressed block");
        end
        blk++;
        if (c_out_last) break;
      end
      r = ref_q.pop_front();
      n_pat[0] += r.n_zzzz; n_pat[1] += r.n_zzzx; n_pat[2] += r.n_mmmm;
      n_pat[3] += r.n_mmmx; n_pat[4] += r.n_mmxx; n_pat[5] += r.n_xxxx;
      check(comp == (r.len < 512), "compressed or raw");
      check(int'(c_out_len) == ((r.len < 512) ? r.len : 512), "line length");
      line_lens.push_back(int'(c_out_len));
    end
  end

  // the locator request is the last block; its set is the front of set_q
  always @(posedge clk) begin
    exp_t e;
    int   st, sz;
    if (rst_n && c_out_valid && c_out_last) begin
      st = set_q.pop_front();
      sz = int'(c_out_len);
      e  = loc_search(sets[st], sz);
      fork
        begin
          repeat (2) @(posedge clk);
          check(loc_valid && loc_way == e.way && loc_slot == e.slot &&
                loc_evict == e.evict && loc_action == loc_action_e'(e.action), "placement");
          n_act[e.action]++;
          n_req++;
          for (int s = 0; s < 2; s++)
            if (e.evict[s]) sets[st][e.way].valid[s] = 1'b0;
          sets[st][e.way].valid[e.slot] = 1'b1;
          sets[st][e.way].size[e.slot]  = 10'(sz);
          lines_done++;
        end
      join_none
      // the next line's set is shown from the next cycle on
      if (set_q.size() > 0) cur_set <= set_q[0];
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog lines=%0d", lines_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
