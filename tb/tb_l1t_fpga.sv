// tb_l1t_fpga: the L1 trigger link FPGA from the 16 SPP buses to the
// S-LINK.  Random events are sent on all buses at once, byte by byte, as
// the preprocessors do; the words on UD must equal a reference assembly
// (three header words, clusters with the chip number, two per word,
// truncated at the 8-bit limit).  LFF# stalls the link at random; one
// link re-initialisation is run.  Also checks that events leave only when
// complete and that no FIFO overflows.
module tb_l1t_fpga;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int N = 16;
  logic [N-1:0][7:0] sd = '0;
  logic [N-1:0] sv = '0;
  logic [7:0] limit = 8'd255;
  logic lreset = 0, lff_n = 1, ldown_n = 1;
  logic [31:0] ud, nev, ntr, nse, nsent;
  logic uwen_n, ureset_n;
  logic [N+1:0] ovf;

  l1t_fpga #(.N(N)) dut (.clk, .rst_n, .l1_reset(1'b0), .spp_data(sd), .spp_valid(sv),
    .link_id(16'h1234), .board_no(8'h07), .cl_limit(limit), .link_reset(lreset),
    .ud, .uwen_n, .lff_n, .ldown_n, .ureset_n,
    .fifo_ovf(ovf), .n_events(nev), .n_truncated(ntr), .n_sync_err(nse), .n_sent(nsent));

  logic [31:0] expw [$];
  always @(negedge clk) if (!uwen_n) begin
    chk(expw.size() > 0 && ud == expw[0], $sformatf("UD %08x vs %08x", ud, (expw.size() > 0) ? expw[0] : 0));
    if (expw.size() > 0) void'(expw.pop_front());
  end

  initial begin
    forever begin
      @(negedge clk);
      if (!ureset_n && ldown_n) begin
        repeat (3) @(negedge clk); ldown_n = 0;
        repeat (20) @(negedge clk); ldown_n = 1;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_gt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 300; ev++) begin
      logic [11:0] l0id;
      logic [1:0] bc;
      logic [7:0] bytes [N][$];
      logic [15:0] cls [$], tf;
      int total, ncl, maxlen, size;
      bit gt;
      limit = (ev % 4 == 0) ? 8'($urandom % 10) : 8'd255;
      l0id = 12'(ev + 1); bc = 2'($urandom);
      cls.delete(); total = 0; gt = 0; tf = '0; maxlen = 0;
      for (int i = 0; i < N; i++) begin
        bit t;
        t = ($urandom % 8) == 0; tf[i] = t;
        ncl = int'($urandom % 4);
        bytes[i].delete();
        bytes[i].push_back(l0id[7:0]);
        bytes[i].push_back({2'b00, bc, l0id[11:8]});
        bytes[i].push_back({t, 7'(ncl)});
        for (int k = 0; k < ncl; k++) begin
          logic [7:0] b;
          b = 8'($urandom);
          bytes[i].push_back(b);
          if (total < int'(limit)) begin cls.push_back({4'b0, b[7], 4'(i), b[6:0]}); total++; end
          else gt = 1;
        end
        if (bytes[i].size() > maxlen) maxlen = bytes[i].size();
      end
      if (gt) n_gt++;
      size = (total + 1) / 2;
      expw.push_back({l0id, bc, 2'b00, 16'h1234});
      expw.push_back({8'h07, 8'(total), tf});
      expw.push_back({gt, 15'b0, 16'(size)});
      for (int w = 0; w < size; w++)
        expw.push_back({(2*w+1 < total) ? cls[2*w+1] : 16'h0, cls[2*w]});
      if (ev == 150) begin lreset = 1; @(negedge clk); lreset = 0; end
      for (int k = 0; k < maxlen; k++) begin
        @(negedge clk);
        lff_n = ($urandom % 5) != 0;
        for (int i = 0; i < N; i++) begin
          sv[i] = k < bytes[i].size();
          sd[i] = sv[i] ? bytes[i][k] : 8'h00;
        end
      end
      @(negedge clk); sv = '0;
      repeat (100) @(negedge clk);  // the builder finishes before the limit changes
    end
    lff_n = 1;
    repeat (2000) @(negedge clk);
    chk(expw.size() == 0, "all words sent");
    chk(nsent == 300 && nev == 300 && ntr == 32'(n_gt) && ovf == '0, "counters");
    chk(n_gt > 20, "truncation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
