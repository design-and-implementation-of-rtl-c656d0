// tb_cpack_decompressor: self-checking testbench of the C-Pack decompressor.
//
// Compressed streams come from the reference model in cpack_ref_pkg, not from
// the RTL compressor.  Each line is sent as its 128-bit blocks with its
// length and compression flag; lines that do not shrink below 512 bits are
// sent uncompressed.  The four output blocks are compared with the original
// line.  Lines sent without gaps must finish 8 cycles after their first
// block is accepted, and a compressed line that follows such a line must be
// accepted 8 cycles after it (one line every 8 cycles); other lines are sent
// with random idle cycles so that the decoder has to wait for input with
// fewer than 68 bits in its buffer.  Lines follow each other with no idle
// cycle.  The block, flag and length are set before in_ready is looked at,
// since in the last decode cycle in_ready depends on in_comp.
module tb_cpack_decompressor;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int NLINES = 300;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic         in_ready;
  logic [127:0] in_data = '0;
  logic         in_comp = 1'b0;
  logic [8:0]   in_len = '0;
  logic         out_valid, out_last, code_err;
  logic [127:0] out_data;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_raw = 0, n_wait = 0, n_gap = 0, n_b2b = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cpack_decompressor dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  logic [511:0] line_q [$];
  int           start_q [$];
  bit           timed_q [$];

  // the decoder waited for input while a pair could not be decoded
  always @(negedge clk)
    if (rst_n && dut.state_q == dut.DECODE && !dut.can_decode) n_wait++;

  // driver
  initial begin
    line_t        w;
    cres_t        r;
    bit           gaps, comp;
    int           nblk, prev_start;
    bit           prev_timed;
    logic [511:0] flat;
    prev_timed = 1'b0;
    prev_start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NLINES; n++) begin
      w = make_line((n % 10 == 9) ? 2 : (n % 3 == 2) ? 1 : 0);
      r = compress(w);
      for (int i = 0; i < 16; i++) flat[32*i +: 32] = w[i];
      comp = (r.len < 512);
      nblk = comp ? (r.len + 127) / 128 : 4;
      gaps = (n % 4 == 1);
      for (int b = 0; b < nblk; b++) begin
        @(negedge clk);
        in_valid = 1'b0;
        if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
        in_data  = comp ? block(r, b) : flat[128*b +: 128];
        in_comp  = comp;
        in_len   = comp ? 9'(r.len) : 9'd0;
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        in_valid = 1'b1;
        if (b == 0) begin
          if (prev_timed && comp && !gaps) begin
            checks++;
            n_b2b++;
            if (cycle - prev_start != 8) begin
              failures++;
              $display("FAIL line %0d accepted %0d cycles after the previous", n, cycle - prev_start);
            end
          end
          prev_timed = comp && !gaps;
          prev_start = cycle;
          line_q.push_back(flat);
          start_q.push_back(cycle);
          timed_q.push_back(comp && !gaps);
          if (!comp) n_raw++;
          if (gaps) n_gap++;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // monitor
  initial begin
    logic [511:0] flat;
    int           st;
    bit           timed;
    wait (rst_n);
    for (int n = 0; n < NLINES; n++) begin
      for (int j = 0; j < 4; j++) begin
        do @(posedge clk); while (!out_valid);
        if (j == 0) begin
          flat  = line_q.pop_front();
          st    = start_q.pop_front();
          timed = timed_q.pop_front();
        end
        check(out_data == flat[128*j +: 128], $sformatf("line %0d block %0d", n, j));
        check(out_last == (j == 3), "last flag");
        check(!code_err, "no code error");
      end
      if (timed) check(cycle - st == 8, $sformatf("latency %0d", cycle - st));
    end
    check(n_raw > 0, "uncompressed lines seen");
    check(n_wait > 0, "decoder waited for input");
    check(n_b2b > 0, "lines back to back");
    $display("lines=%0d raw=%0d gapped=%0d wait_cycles=%0d back_to_back=%0d",
             NLINES, n_raw, n_gap, n_wait, n_b2b);
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
