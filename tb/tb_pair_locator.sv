// tb_pair_locator: self-checking testbench of the pair-matching line locator.
//
// Random set states (empty ways, ways with one line, ways with two lines,
// sizes from 2 to 512 bits) and request sizes are sent one per cycle.  The
// expected decision comes from an exhaustive search over every legal
// placement, ranked by number of evictions, then leftover space, then way,
// then the evicted slot.  Each response must appear exactly two cycles after
// its request.  Every kind of placement must occur.  A second locator with
// 4 ways, the other set size the pairing scheme was evaluated with, sees the
// first four ways of the same sets and is checked the same way.
module tb_pair_locator;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int WAYS = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         req_valid = 1'b0;
  logic [9:0]   req_size = '0;
  loc_way_t     ways [WAYS];
  logic         rsp_valid;
  logic [2:0]   rsp_way;
  logic         rsp_slot;
  logic [1:0]   rsp_evict;
  loc_action_e  rsp_action;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_act [4] = '{0, 0, 0, 0};

  exp_t exp_q [$];
  int   due_q [$];

  // the 4-way locator
  loc_way_t     ways4 [4];
  logic         rsp4_valid;
  logic [1:0]   rsp4_way;
  logic         rsp4_slot;
  logic [1:0]   rsp4_evict;
  loc_action_e  rsp4_action;
  exp_t         exp4_q [$];
  int           n_act4 [4] = '{0, 0, 0, 0};

  assign ways4 = '{ways[0], ways[1], ways[2], ways[3]};

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  pair_locator #(.WAYS(WAYS)) dut (.*);

  pair_locator #(.WAYS(4)) dut4 (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_valid  (req_valid),
    .req_size   (req_size),
    .ways       (ways4),
    .rsp_valid  (rsp4_valid),
    .rsp_way    (rsp4_way),
    .rsp_slot   (rsp4_slot),
    .rsp_evict  (rsp4_evict),
    .rsp_action (rsp4_action)
  );

  function automatic logic [9:0] rnd_size();
    case ($urandom_range(0, 3))
      0:       return 10'd512;
      1:       return 10'($urandom_range(2, 160));
      default: return 10'($urandom_range(100, 400));
    endcase
  endfunction

  initial begin
    int scen;
    for (int w = 0; w < WAYS; w++) ways[w] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      scen = $urandom_range(0, 3);
      for (int w = 0; w < WAYS; w++) begin
        case ((scen == 3) ? 3 : $urandom_range(0, 3))
          0: ways[w] = '0;
          1: begin ways[w].valid = 2'b01; ways[w].size[0] = rnd_size(); ways[w].size[1] = '0; end
          2: begin ways[w].valid = 2'b10; ways[w].size[1] = rnd_size(); ways[w].size[0] = '0; end
          default: begin
            ways[w].valid = 2'b11;
            ways[w].size[0] = 10'($urandom_range(2, 300));
            ways[w].size[1] = 10'($urandom_range(2, 509 - ways[w].size[0]));
          end
        endcase
      end
      req_valid = ($urandom_range(0, 4) != 0);
      req_size  = (scen == 3 && $urandom_range(0, 1) == 1) ? 10'd512 : rnd_size();
      if (req_valid) begin
        exp_q.push_back(loc_search(ways, int'(req_size)));
        exp4_q.push_back(loc_search(ways, int'(req_size), 4));
        due_q.push_back(cycle + 2);
      end
    end
    @(negedge clk);
    req_valid = 1'b0;
    repeat (4) @(negedge clk);
    for (int a = 0; a < 4; a++) begin
      checks += 2;
      if (n_act[a] == 0 || n_act4[a] == 0) begin
        failures++;
        $display("FAIL action %0d never taken", a);
      end
    end
    checks++;
    if (exp_q.size() != 0 || exp4_q.size() != 0) begin
      failures++;
      $display("FAIL responses missing");
    end
    $display("8 ways: empty=%0d partner=%0d evict_one=%0d evict_two=%0d",
             n_act[0], n_act[1], n_act[2], n_act[3]);
    $display("4 ways: empty=%0d partner=%0d evict_one=%0d evict_two=%0d",
             n_act4[0], n_act4[1], n_act4[2], n_act4[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responses, sampled before the clock edge
  always @(posedge clk) begin
    exp_t e;
    int   due;
    if (rst_n && rsp_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected response");
      end else begin
        e   = exp_q.pop_front();
        due = due_q.pop_front();
        n_act[e.action]++;
        if (cycle != due || rsp_way != e.way || rsp_slot != e.slot ||
            rsp_evict != e.evict || rsp_action != loc_action_e'(e.action)) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d (due %0d): way %0d slot %0d evict %b act %0d, expected %0d %0d %b %0d",
                     cycle, due, rsp_way, rsp_slot, rsp_evict, rsp_action,
                     e.way, e.slot, e.evict, e.action);
        end
      end
    end
  end

  always @(posedge clk) begin
    exp_t e;
    if (rst_n && rsp4_valid) begin
      checks++;
      if (exp4_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected 4-way response");
      end else begin
        e = exp4_q.pop_front();
        n_act4[e.action]++;
        if (!rsp_valid || rsp4_way != e.way[1:0] || e.way[2] || rsp4_slot != e.slot ||
            rsp4_evict != e.evict || rsp4_action != loc_action_e'(e.action)) begin
          failures++;
          if (failures < 10)
            $display("FAIL 4 ways cycle %0d: way %0d slot %0d evict %b act %0d, expected %0d %0d %b %0d",
                     cycle, rsp4_way, rsp4_slot, rsp4_evict, rsp4_action,
                     e.way, e.slot, e.evict, e.action);
        end
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
