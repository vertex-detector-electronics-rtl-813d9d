// tb_l1t_event_builder: sixteen input FIFOs modelled as queues, filled
// with random events (random cluster counts per chip, sometimes an Error
// bit or a wrong L0ID on one chip, sometimes many clusters).  The output
// words must equal a reference assembly written here: three header words,
// clusters widened with the chip number and packed two per word, the
// 8-bit limit with GT, and the event length pushed for the sender.  The
// output FIFO space offered varies, including too little for an event.
module tb_l1t_event_builder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int N = 16;
  logic [15:0] link_id = 16'hBEEF;
  logic [7:0]  board = 8'h5A, limit = 8'd255;
  logic [N-1:0][7:0] in_data;
  logic [N-1:0] in_empty, in_rd;
  logic out_wr, len_wr;
  logic [31:0] out_data;
  logic [9:0] out_free = 10'd512;
  logic [15:0] len_data;
  logic [31:0] nev, ntr, nse;

  l1t_event_builder #(.N(N), .OUT_AW(10)) dut (.clk, .rst_n, .l1_reset(1'b0), .link_id,
    .board_no(board), .limit, .in_data, .in_empty, .in_rd, .out_wr, .out_data, .out_free,
    .len_wr, .len_data, .n_events(nev), .n_truncated(ntr), .n_sync_err(nse));

  logic [7:0] q [N][$];
  always_comb for (int i = 0; i < N; i++) begin
    in_empty[i] = q[i].size() == 0;
    in_data[i]  = (q[i].size() > 0) ? q[i][0] : 8'h00;
  end
  always @(posedge clk) for (int i = 0; i < N; i++) if (in_rd[i] && q[i].size() > 0) void'(q[i].pop_front());

  logic [31:0] expw [$];
  int          expl [$];
  int n_words = 0;
  always @(negedge clk) begin
    if (out_wr) begin
      chk(expw.size() > 0, "unexpected word");
      if (expw.size() > 0) begin
        chk(out_data == expw[0], $sformatf("word %08x vs %08x", out_data, expw[0]));
        void'(expw.pop_front());
      end
    end
    if (len_wr) begin
      chk(expl.size() > 0 && len_data == 16'(expl[0]), "length");
      if (expl.size() > 0) void'(expl.pop_front());
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_gt = 0, n_se = 0, n_wait = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 600; ev++) begin
      logic [11:0] l0id;
      logic [1:0] bc, err;
      logic [15:0] tf;
      logic [15:0] cls [$];
      int total, ncl;
      bit gt;
      limit = (ev % 4 == 0) ? 8'($urandom % 20) : 8'd255;
      l0id = 12'($urandom); bc = 2'($urandom);
      err = 2'b00; tf = '0; cls.delete(); total = 0; gt = 0;
      for (int i = 0; i < N; i++) begin
        logic [11:0] my_l0;
        logic [1:0]  my_err;
        bit t;
        my_l0 = l0id;
        if (ev % 9 == 4 && i == 5) begin my_l0 = l0id ^ 12'h001; err[1] = 1; end
        my_err = (ev % 6 == 1 && i == 3) ? 2'b01 : 2'b00;
        if (my_err != 0) err[0] = 1;
        t = $urandom % 2;
        tf[i] = t;
        ncl = (ev % 5 == 0) ? int'($urandom % 20) : int'($urandom % 3);
        q[i].push_back(my_l0[7:0]);
        q[i].push_back({my_err, bc, my_l0[11:8]});
        q[i].push_back({t, 7'(ncl)});
        for (int k = 0; k < ncl; k++) begin
          logic [7:0] b;
          b = 8'($urandom);
          q[i].push_back(b);
          if (total < int'(limit)) begin
            cls.push_back({4'b0, b[7], 4'(i), b[6:0]});
            total++;
          end else gt = 1;
        end
      end
      if (gt) n_gt++;
      if (err[1]) n_se++;
      begin
        int size;
        size = (total + 1) / 2;
        expw.push_back({l0id, bc, err, link_id});
        expw.push_back({board, 8'(total), tf});
        expw.push_back({gt, 15'b0, 16'(size)});
        for (int w = 0; w < size; w++)
          expw.push_back({(2*w+1 < total) ? cls[2*w+1] : 16'h0, cls[2*w]});
        expl.push_back(size + 3);
      end
      // offer the output space: sometimes too little for a while
      if (ev % 11 == 7) begin
        out_free = 10'd2;
        repeat (100) @(negedge clk);
        chk(expw.size() > 0 && !out_wr, "waits for output space");
        n_wait++;
        out_free = 10'd512;
      end
      while (expw.size() != 0) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    chk(expl.size() == 0, "all lengths");
    chk(nev == 600 && ntr == 32'(n_gt) && nse == 32'(n_se), "event counters");
    chk(n_gt > 20 && n_se > 20 && n_wait > 20, "truncation, sync error and wait seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
