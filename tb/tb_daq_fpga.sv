// tb_daq_fpga: DAQ link FPGA from the 16 DSP links to the S-LINK.
//
// Random event fragments in the DSP format (five header words, DAQ
// clusters, L1 trigger clusters, non-processed samples) are sent on all
// 16 links, each link at its own random rate and stopping while its FIFO
// full flag is set.  The words on UD are compared with a reference
// assembly of the DAQ event (seven header words; DSP number added to
// every cluster; L1 trigger clusters cut at the limit with GT; padding to
// whole 32-bit words).  LFF# is held low for long periods so that the
// full flags back-pressure the DSPs.  Fragments with a different L1ID on
// one DSP must give the sync error bit.  Z-mode fragments are included;
// these are larger than the output FIFO and must be cut at 504 data words
// with the DT bit set.
module tb_daq_fpga;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int N = 16;
  logic [N-1:0][15:0] dd = '0;
  logic [N-1:0] dv = '0, dfull;
  logic [7:0] limit = 8'd255, np_count = 8'd8;
  logic lreset = 0, lff_n = 1, ldown_n = 1;
  logic [31:0] ud, l1id32, nev, nse, ntr, nsent;
  logic uwen_n, ureset_n, sovf;
  logic [1:0] fovf;

  daq_fpga #(.N(N)) dut (.clk, .rst_n, .l1_reset(1'b0), .l1id_reset(1'b0),
    .dsp_data(dd), .dsp_valid(dv), .dsp_full(dfull),
    .link_id(16'hBEEF), .board_no(8'h2A), .cl_limit(limit), .np_count, .link_reset(lreset),
    .ud, .uwen_n, .lff_n, .ldown_n, .ureset_n,
    .fifo_ovf(fovf), .l1id32, .n_events(nev), .n_sync_err(nse), .n_truncated(ntr),
    .n_sent(nsent), .stage_ovf(sovf));

  logic [15:0] q [N][$];
  logic [31:0] expw [$];
  int n_full = 0, n_words = 0, n_dt = 0;

  // links: each DSP sends when it has data and its FIFO is not full
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      dv[i] = 1'b0;
      if (dfull[i]) n_full++;
      if (q[i].size() > 0 && !dfull[i] && ($urandom % 4) != 0) begin
        dv[i] = 1'b1;
        dd[i] = q[i].pop_front();
      end
    end
  end

  always @(negedge clk) if (!uwen_n) begin
    chk(expw.size() > 0 && ud == expw[0], $sformatf("UD word %0d: %08x vs %08x", n_words, ud,
        (expw.size() > 0) ? expw[0] : 0));
    if (expw.size() > 0) void'(expw.pop_front());
    n_words++;
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
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one event: fragments into the link queues, expected words into expw
  task automatic event_gen(input int ev, input bit z, input bit bad);
    logic [15:0] l1id16 = 16'(ev + 1);
    logic [11:0] l0id = 12'($urandom), bcid = 12'($urandom);
    logic [7:0] pcn = 8'($urandom);
    logic [63:0] ef = '0;
    logic [15:0] tf = '0;
    logic [15:0] halves [$];
    int ndaq = 0, nl1t = 0, nwords;
    bit gt = 0, r = (ev == 0), dt;
    int npw = z ? 64 : ((np_count > 128) ? 64 : (int'(np_count) + 1) / 2);
    halves.delete();
    for (int i = 0; i < N; i++) begin
      int nc = z ? 0 : int'($urandom % 4);
      int m = int'($urandom % 6);
      logic [3:0] e = (($urandom % 10) == 0) ? 4'($urandom) : 4'h0;
      bit t = ($urandom % 8) == 0;
      logic [15:0] body [$];
      logic [7:0] b [$];
      body.delete(); b.delete();
      ef[4*i +: 4] = e; tf[i] = t;
      for (int k = 0; k < nc; k++) begin
        int len = 1 + int'($urandom % 7);
        logic [6:0] a = 7'($urandom);
        body.push_back({6'b0, 3'(len), a});
        halves.push_back({1'b0, 3'(len), 1'b0, 4'(i), a});
        for (int j = 0; j < (len + 1) / 2; j++) begin
          logic [15:0] v = 16'($urandom);
          body.push_back(v); halves.push_back(v);
        end
      end
      for (int k = 0; k < m; k++) begin
        logic [7:0] x = 8'($urandom);
        b.push_back(x);
        if (nl1t < int'(limit)) begin
          halves.push_back({3'b0, x[7], 1'b0, 4'(i), x[6:0]}); nl1t++;
        end else gt = 1;
      end
      for (int k = 0; k < m; k += 2) body.push_back({(k + 1 < m) ? b[k+1] : 8'h00, b[k]});
      for (int k = 0; k < npw; k++) begin
        logic [15:0] v = 16'($urandom);
        body.push_back(v); halves.push_back(v);
      end
      ndaq += nc;
      q[i].push_back((bad && i == 9) ? ~l1id16 : l1id16);
      q[i].push_back({e, l0id});
      q[i].push_back({r, z, 2'b00, bcid});
      q[i].push_back({pcn, 8'(nc)});
      q[i].push_back({t, 7'(m), 8'h00});
      foreach (body[k]) q[i].push_back(body[k]);
    end
    if (halves.size() % 2) halves.push_back(16'h0);
    nwords = halves.size() / 2;
    dt = nwords > 504;               // cut to fit the output FIFO
    if (dt) begin nwords = 504; n_dt++; end
    expw.push_back(32'(ev + 1));
    expw.push_back({l0id, bcid, pcn});
    expw.push_back(ef[63:32]);
    expw.push_back(ef[31:0]);
    expw.push_back({16'hBEEF, 8'h2A, r, z, gt, bad, dt, 3'b0});
    expw.push_back({12'(ndaq), 12'(nl1t), 8'b0});
    expw.push_back({tf, 16'(nwords)});
    for (int k = 0; k < nwords; k++) expw.push_back({halves[2*k+1], halves[2*k]});
  endtask

  function automatic int queued();
    int s = 0;
    for (int i = 0; i < N; i++) s += q[i].size();
    return s;
  endfunction

  initial begin
    int n_gt = 0, n_bad = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 400; ev++) begin
      bit z, bad;
      // configuration changes only while the FPGA is empty
      if (ev % 50 == 0) begin
        while (expw.size() != 0 || queued() != 0) begin
          @(negedge clk); lff_n = ($urandom % 5) != 0;
        end
        repeat (20) @(negedge clk);
        limit = (ev % 100 == 50) ? 8'(5 + $urandom % 20) : 8'd255;
        np_count = 8'($urandom % 140);
      end
      z = (ev % 7) == 3;
      bad = (ev % 37) == 5;
      if (bad) n_bad++;
      event_gen(ev, z, bad);
      if (ev == 200) begin
        while (expw.size() != 0) begin
          @(negedge clk); lff_n = ($urandom % 5) != 0;
        end
        lreset = 1; @(negedge clk); lreset = 0;
      end
      // LFF# low for long stretches in the second quarter
      while (queued() > 200) begin
        @(negedge clk);
        lff_n = (ev >= 100 && ev < 200) ? (($urandom % 4) == 0) : (($urandom % 5) != 0);
      end
    end
    while (expw.size() != 0) begin
      @(negedge clk); lff_n = ($urandom % 5) != 0;
    end
    lff_n = 1;
    repeat (100) @(negedge clk);
    chk(nsent == 400 && nev == 400 && l1id32 == 400, "event counters");
    chk(nse == 32'(n_bad), "sync errors counted");
    chk(ntr > 0, "truncation seen");
    chk(n_full > 100, "DSP links back-pressured");
    chk(fovf == 2'b00, "no FIFO overflow");
    chk(n_dt > 0 && sovf, "Z-mode events cut to the output FIFO");
    $display("full=%0d trunc=%0d words=%0d", n_full, ntr, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
