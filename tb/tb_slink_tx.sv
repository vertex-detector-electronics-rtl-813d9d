// tb_slink_tx: events of random length in a modelled output FIFO and
// length queue; a model of the link source card asserts LFF# at random
// and answers URESET# by pulling LDOWN# low for a while.  Every word must
// reach UD in order, with no word while the link is down, an event must
// not be split by a re-initialisation, and URESET# must be held until
// LDOWN# has returned high.
module tb_slink_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] fd, ud;
  logic fe, frd, le, lrd, lreset = 0, uwen_n, lff_n = 1, ldown_n = 1, ureset_n, inr;
  logic [15:0] ld;
  logic [31:0] nsent;

  slink_tx dut (.clk, .rst_n, .fifo_data(fd), .fifo_empty(fe), .fifo_rd(frd),
    .len_data(ld), .len_empty(le), .len_rd(lrd), .link_reset(lreset),
    .ud, .uwen_n, .lff_n, .ldown_n, .ureset_n, .n_sent(nsent), .in_reset(inr));

  // FIFO models: arrays with read and write indices
  logic [31:0] wmem [65536];
  logic [15:0] lmem [1024];
  int wwi = 0, wri = 0, lwi = 0, lri = 0;
  assign fe = (wwi == wri);
  assign fd = wmem[wri];
  assign le = (lwi == lri);
  assign ld = lmem[lri];
  always @(posedge clk) begin
    if (frd && !fe) wri <= wri + 1;
    if (lrd && !le) lri <= lri + 1;
  end

  // link source card model
  int n_resets = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (!ureset_n && ldown_n) begin
        repeat (5) @(negedge clk);
        ldown_n = 0;
        repeat (50) @(negedge clk);
        ldown_n = 1;
        @(negedge clk);
        @(negedge clk);
        chk(ureset_n, "URESET# released after LDOWN# high");
        n_resets++;
      end
    end
  end

  logic [31:0] expw [$];
  int words_in_event = 0, ev_len [$];
  always @(negedge clk) begin
    if (!uwen_n) begin
      chk(expw.size() > 0 && ud == expw[0], "word order");
      if (expw.size() > 0) void'(expw.pop_front());
      words_in_event++;
      if (ev_len.size() > 0 && words_in_event == ev_len[0]) begin
        words_in_event = 0; void'(ev_len.pop_front());
      end
    end
    if (!ureset_n) chk(words_in_event == 0, "no reset inside an event");
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_stall = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 400; ev++) begin
      int len;
      len = 1 + $urandom % 40;
      for (int k = 0; k < len; k++) begin
        logic [31:0] w;
        w = $urandom;
        wmem[wwi] = w; wwi++; expw.push_back(w);
      end
      lmem[lwi] = 16'(len); lwi++; ev_len.push_back(len);
      if (ev % 50 == 10) begin lreset = 1; @(negedge clk); lreset = 0; end
      repeat ($urandom % 30) begin
        @(negedge clk);
        lff_n = ($urandom % 4) != 0;
        if (!lff_n) n_stall++;
      end
      lff_n = 1;
    end
    while (expw.size() != 0) @(negedge clk);
    repeat (100) @(negedge clk);
    chk(nsent == 400, "events sent");
    chk(n_resets >= 5 && n_stall > 100, "resets and LFF# stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
