// cpack_ref_pkg: reference model of C-Pack line compression for the
// testbenches, written word by word from the pattern table and independent
// of the RTL.
//
// compress() codes the 16 words of a line one after the other against a
// 16-entry most-recent-first dictionary that starts all zero; every word but
// zzzz and zzzx is put at the front.  Because words are handled strictly in
// order, this gives what the two-words-per-cycle hardware must give.  The
// result is the bit stream (first bit at the top), its length, and the length after
// the first 14 words (used for timing checks), plus per-pattern counts.
// loc_search() gives the line locator's decision by trying every legal
// placement in a set of up to 8 ways.  make_line() generates lines whose words mix all six patterns in a chosen
// proportion.
package cpack_ref_pkg;

  localparam int MAXBITS = 600;

  typedef logic [31:0] line_t [16];

  typedef struct {
    logic [MAXBITS-1:0] bits;    // compressed stream, first bit at the top
    int                 len;     // length in bits
    int                 len14;   // length of the first 14 words
    int                 n_zzzz, n_zzzx, n_mmmm, n_mmmx, n_mmxx, n_xxxx;
    int                 n_pair_hit;  // second word of a pair coded from the first
  } cres_t;

  function automatic void put(ref cres_t r, input logic [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      r.bits[MAXBITS-1-r.len] = v[i];
      r.len++;
    end
  endfunction

  function automatic cres_t compress(line_t w);
    cres_t        r;
    logic [31:0]  dict [16];
    int           best, bidx, m;
    r.bits = '0;
    r.len = 0;
    r.len14 = 0;
    r.n_zzzz = 0; r.n_zzzx = 0; r.n_mmmm = 0; r.n_mmmx = 0; r.n_mmxx = 0;
    r.n_xxxx = 0; r.n_pair_hit = 0;
    foreach (dict[i]) dict[i] = 32'h0;
    for (int k = 0; k < 16; k++) begin
      if (k == 14) r.len14 = r.len;
      if (w[k] == 32'h0) begin
        put(r, 64'b00, 2);
        r.n_zzzz++;
      end else if (w[k] < 32'h100) begin
        put(r, 64'b1101, 4);
        put(r, 64'(w[k][7:0]), 8);
        r.n_zzzx++;
      end else begin
        best = 0;
        bidx = 0;
        for (int i = 0; i < 16; i++) begin
          m = 0;
          if (dict[i] == w[k]) m = 4;
          else if (dict[i][31:8] == w[k][31:8]) m = 3;
          else if (dict[i][31:16] == w[k][31:16]) m = 2;
          if (m > best) begin
            best = m;
            bidx = i;
          end
        end
        if (best > 0 && bidx == 0 && (k % 2) == 1 && w[k-1] >= 32'h100)
          r.n_pair_hit++;
        case (best)
          4: begin
            put(r, 64'b10, 2); put(r, 64'(bidx), 4); r.n_mmmm++;
          end
          3: begin
            put(r, 64'b1110, 4); put(r, 64'(bidx), 4);
            put(r, 64'(w[k][7:0]), 8); r.n_mmmx++;
          end
          2: begin
            put(r, 64'b1100, 4); put(r, 64'(bidx), 4);
            put(r, 64'(w[k][15:0]), 16); r.n_mmxx++;
          end
          default: begin
            put(r, 64'b01, 2); put(r, 64'(w[k]), 32); r.n_xxxx++;
          end
        endcase
        for (int i = 15; i > 0; i--) dict[i] = dict[i-1];
        dict[0] = w[k];
      end
    end
    return r;
  endfunction

  // Block j of a stream: bit 127 of the block is stream bit 128*j.
  function automatic logic [127:0] block(cres_t r, int j);
    logic [127:0] b;
    for (int i = 0; i < 128; i++)
      b[127-i] = (128*j + i < MAXBITS) ? r.bits[MAXBITS-1-(128*j + i)] : 1'b0;
    return b;
  endfunction

  // A line with words drawn from the six patterns; mix selects the
  // proportion of literal words (0: few, 1: some, 2: all literal, 3: none).
  function automatic line_t make_line(int mix);
    line_t        w;
    int           sel, j;
    for (int k = 0; k < 16; k++) begin
      sel = $urandom_range(0, 9);
      if (mix == 2) sel = 9;
      else if (mix == 3) sel = $urandom_range(0, 5);
      else if (mix == 1 && sel < 4) sel = 9;
      j = (k > 0) ? $urandom_range(0, k - 1) : 0;
      case (sel)
        0: w[k] = 32'h0;
        1: w[k] = 32'($urandom_range(1, 255));
        2: w[k] = (k > 0 && w[j] >= 32'h100) ? w[j] : 32'h1234_5678;
        3: w[k] = (k > 0 && w[j] >= 32'h100) ? {w[j][31:8], 8'($urandom)} : 32'h1234_5600;
        4: w[k] = (k > 0 && w[j] >= 32'h100) ? {w[j][31:16], 16'($urandom)} : 32'h1234_0000;
        5: w[k] = (k > 0) ? {w[k-1][31:8], 8'($urandom)} : 32'hCAFE_0001;
        default: w[k] = $urandom | 32'h0100_0000;
      endcase
    end
    return w;
  endfunction

  // Pair-matching placement reference: the decision of the line locator.
  typedef struct packed {
    logic [2:0] way;
    logic       slot;
    logic [1:0] evict;
    logic [1:0] action;
  } exp_t;

  localparam int WAYS = 8;


  // every legal placement in the first nways ways, keep the smallest
  // (evictions, slack, way, slot)
  function automatic exp_t loc_search(cpack_pkg::loc_way_t st [WAYS], int n,
                                      int nways = WAYS);
    exp_t e;
    int   best_cost, cost, used, nev;
    best_cost = 1 << 30;
    e = '0;
    for (int w = 0; w < nways; w++) begin
      // option a: keep everything
      if (st[w].valid == 2'b00) begin
        cost = (0 << 20) + (512 - n) * 32 + w * 4;
        if (cost < best_cost) begin
          best_cost = cost; e = '{w[2:0], 1'b0, 2'b00, 2'd0};
        end
      end else if (st[w].valid != 2'b11) begin
        used = st[w].valid[0] ? int'(st[w].size[0]) : int'(st[w].size[1]);
        if (used + n < 512) begin
          cost = (0 << 20) + (512 - used - n) * 32 + w * 4;
          if (cost < best_cost) begin
            best_cost = cost; e = '{w[2:0], st[w].valid[0], 2'b00, 2'd1};
          end
        end
      end
      // option b: evict one line
      for (int s = 0; s < 2; s++) begin
        if (st[w].valid[s]) begin
          used = st[w].valid[1-s] ? int'(st[w].size[1-s]) : 0;
          if (used + n < 512 || used == 0) begin
            cost = (1 << 20) + (512 - used - n) * 32 + w * 4 + s;
            if (cost < best_cost) begin
              best_cost = cost;
              e = '{w[2:0], s[0], (s == 0) ? 2'b01 : 2'b10, 2'd2};
            end
          end
        end
      end
      // option c: evict both lines
      if (st[w].valid == 2'b11) begin
        cost = (2 << 20) + (512 - n) * 32 + w * 4;
        if (cost < best_cost) begin
          best_cost = cost; e = '{w[2:0], 1'b0, 2'b11, 2'd3};
        end
      end
    end
    return e;
  endfunction

endpackage
