// tb_cpack_compressor: self-checking testbench of the C-Pack compressor.
//
// Sends lines of mixed content (mostly compressible, some barely, some fully
// literal so that the raw fallback is taken) back to back, and compares every
// output block, its flags and the reported length with the reference model
// in cpack_ref_pkg.  It also checks the cycle of each line's last block: the
// raw fallback ends 12 cycles after the line's first beat (13 cycles in all)
// and 5 after its last beat, a compressed line 9 or 10 cycles after the first
// beat (2 or 3 after the last), depending on whether its last pair crosses a
// block boundary with bits left over.  Lines follow each other with no idle
// cycle, and in_ready may drop only for the 3-cycle stall behind each raw
// line, so the input runs at one beat per cycle otherwise.  Some lines are
// sent with idle cycles between beats.
module tb_cpack_compressor;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int NLINES = 300;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               in_valid = 1'b0;
  logic               in_ready;
  logic [63:0]        in_data = '0;
  logic               out_valid, out_comp, out_first, out_last;
  logic [127:0]       out_data;
  logic [TOTAL_W-1:0] out_len;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_raw = 0, n_flush = 0, n_gap = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cpack_compressor dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // expected output of every line, filled by the driver
  cres_t  exp_q [$];
  logic [511:0] line_q [$];
  int     start_q [$];
  int     lastb_q [$];
  int     n_stall = 0;
  bit     gap_q [$];

  // driver
  initial begin
    line_t w;
    cres_t r;
    bit    gaps;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NLINES; n++) begin
      w = make_line((n % 10 == 9) ? 2 : (n % 3 == 2) ? 1 : 0);
      if (n == 0) foreach (w[i]) w[i] = 32'h0;
      r = compress(w);
      gaps = (n % 7 == 3);
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        if (gaps && b > 0 && ($urandom_range(0, 1) == 1)) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b0;
        while (!in_ready) @(negedge clk);
        in_valid = 1'b1;
        in_data  = {w[2*b+1], w[2*b]};
        if (b == 0) begin
          exp_q.push_back(r);
          line_q.push_back({w[15], w[14], w[13], w[12], w[11], w[10], w[9], w[8],
                            w[7], w[6], w[5], w[4], w[3], w[2], w[1], w[0]});
          start_q.push_back(cycle);
          gap_q.push_back(gaps);
        end
        if (b == 7) lastb_q.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // cycles the compressor refuses input
  always @(negedge clk)
    if (rst_n && !in_ready) n_stall++;

  // monitor
  initial begin
    cres_t r;
    logic [511:0] w;
    int    st, lb, nblk, blk, exp_end;
    bit    g;
    logic [127:0] rawb;
    wait (rst_n);
    for (int n = 0; n < NLINES; n++) begin
      // wait for the line's first block
      do @(negedge clk); while (!(out_valid && out_first));
      wait (exp_q.size() > 0);
      r = exp_q.pop_front();
      w = line_q.pop_front();
      st = start_q.pop_front();
      g = gap_q.pop_front();
      if (r.len >= 512) begin
        n_raw++;
        // compressed blocks may come first; the raw copy starts at a new
        // out_first with out_comp low
        while (out_comp) do @(negedge clk); while (!(out_valid && out_first));
        for (int j = 0; j < 4; j++) begin
          if (j > 0) @(negedge clk);
          rawb = w[128*j +: 128];
          check(out_valid && !out_comp, "raw block valid");
          check(out_data == rawb, $sformatf("raw block %0d data", j));
          check(out_first == (j == 0) && out_last == (j == 3), "raw flags");
        end
        check(out_len == 10'd512, "raw length");
        // a line's first block may leave before its last beat is sent
        lb = lastb_q.pop_front();
        check(cycle - lb == 5, $sformatf("raw delay after last beat %0d", cycle - lb));
        if (lb - st == 7) check(cycle - st == 12, $sformatf("raw latency %0d", cycle - st));
      end else begin
        nblk = (r.len + 127) / 128;
        blk = 0;
        forever begin
          if (blk > 0) do @(negedge clk); while (!out_valid);
          check(out_comp, "compressed flag");
          check(out_first == (blk == 0), "first flag");
          check(out_data == block(r, blk), $sformatf("line %0d block %0d data", n, blk));
          blk++;
          if (out_last || blk == nblk) break;
        end
        check(out_last && blk == nblk, $sformatf("block count %0d/%0d", blk, nblk));
        check(out_len == TOTAL_W'(r.len), "compressed length");
        lb = lastb_q.pop_front();
        exp_end = (nblk - r.len14 / 128 == 2) ? 10 : 9;
        if (exp_end == 10) n_flush++;
        check(cycle - lb == exp_end - 7,
              $sformatf("delay after last beat %0d expected %0d", cycle - lb, exp_end - 7));
        if (lb - st == 7) check(cycle - st == exp_end,
                                $sformatf("latency %0d expected %0d", cycle - st, exp_end));
        if (g) n_gap++;
      end
    end
    repeat (2) @(negedge clk);
    check(n_stall == 3 * n_raw, $sformatf("stall cycles %0d for %0d raw lines", n_stall, n_raw));
    check(n_raw > 0, "raw fallback seen");
    check(n_flush > 0, "trailing flush seen");
    $display("lines=%0d raw=%0d flush=%0d gapped=%0d stall_cycles=%0d", NLINES, n_raw, n_flush, n_gap, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
