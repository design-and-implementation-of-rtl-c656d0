// tb_cpack_fifo_dict: self-checking testbench of the FIFO dictionary.
//
// Applies random clears and single and double pushes and compares all 16
// entries after every clock with a queue model: newest word in front, oldest
// dropped once 16 are held, the first word of a double push older than the
// second.
module tb_cpack_fifo_dict;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        clear = 1'b0, push1 = 1'b0, push2 = 1'b0;
  logic [31:0] word1 = '0, word2 = '0;
  logic [31:0] entries [16];

  int checks = 0;
  int failures = 0;
  int n_double = 0, n_full = 0;

  logic [31:0] model [$];

  always #5 clk = ~clk;

  cpack_fifo_dict dut (.*);

  initial begin
    int sel;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 16; i++) model.push_back(32'h0);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      sel   = $urandom_range(0, 99);
      clear = (sel == 0);
      push1 = 1'($urandom_range(0, 1));
      push2 = 1'($urandom_range(0, 1));
      word1 = $urandom;
      word2 = $urandom;
      // model update
      if (clear) begin
        model.delete();
        for (int i = 0; i < 16; i++) model.push_back(32'h0);
      end else begin
        if (push1) begin model.push_front(word1); void'(model.pop_back()); end
        if (push2) begin model.push_front(word2); void'(model.pop_back()); end
        if (push1 && push2) n_double++;
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (entries[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d entry %0d %h expected %h", t, i, entries[i], model[i]);
        end
      end
      if (t > 20 && !clear) n_full++;
    end
    checks++;
    if (n_double == 0) failures++;
    $display("double pushes=%0d", n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
