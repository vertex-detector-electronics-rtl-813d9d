// tb_l1b_dsp: L1 buffer DSP processing.
//
// A behavioural L1 buffer (one clock read latency) holds random events
// written at random slots.  L1 accepts are issued for them; the 16-bit
// words the DSP sends are compared with a reference model of the whole
// processing: the five header words, the zero-suppressed DAQ clusters
// (runs of at most seven channels above pedestal + threshold), the L1
// trigger clusters (pairs, lowest channel first, cluster limit) and the
// non-processed samples from channel 4*L1ID<4..0>; in Z mode only the L1
// trigger clusters and all 128 samples.  The DAQ-side full flag is held
// at random and for long periods so that the throttle must rise; a wrong
// L0ID in a decision must be flagged; an L1_Reset restarts the L1ID.
module tb_l1b_dsp;
  import l1_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic l1_reset = 0, l1id_reset = 0;
  logic l1a_valid = 0;
  logic [4:0] l1a_info = '0;
  logic [PTR_W-1:0] l1a_ptr = '0;
  logic buf_re;
  logic [BUF_ADDR_W-1:0] buf_raddr;
  logic [31:0] buf_rdata;
  logic z_mode = 0;
  logic [7:0] np_count = 8'd8;
  logic [6:0] cl_limit = 7'd64;
  logic [3:0] thr_events = 4'd13;
  logic [7:0] zs_thr = 8'd20;
  logic ped_we = 0;
  logic [6:0] ped_addr = '0;
  logic [7:0] ped_wdata = '0;
  logic [15:0] od;
  logic ov, ofull = 0;
  logic thr, l0e, dsp_ready;
  logic [15:0] l1id, nl0e;
  logic [4:0] occ;

  l1b_dsp dut (.clk, .rst_n, .l1_reset, .l1id_reset, .ecs_l1id_wr(1'b0),
    .l1a_valid, .l1a_info, .l1a_ptr, .buf_re, .buf_raddr, .buf_rdata,
    .z_mode, .np_count, .cl_limit, .thr_events, .zs_threshold(zs_thr),
    .ped_we, .ped_addr, .ped_wdata, .out_data(od), .out_valid(ov), .out_full(ofull),
    .throttle(thr), .l1id, .occupancy(occ), .l0id_err(l0e), .n_l0id_err(nl0e), .dsp_ready);

  // behavioural L1 buffer, only the slots used here
  logic [31:0] mem [2**BUF_ADDR_W];
  always @(posedge clk) if (buf_re) buf_rdata <= mem[buf_raddr];

  logic [7:0] ped [128];
  logic [15:0] expw [$];
  int n_thr = 0, n_words = 0;

  always @(negedge clk) begin
    if (ov) begin
      chk(expw.size() > 0 && od == expw[0], $sformatf("word %0d: %04x vs %04x", n_words, od,
          (expw.size() > 0) ? expw[0] : 0));
      if (expw.size() > 0) void'(expw.pop_front());
      n_words++;
    end
    if (thr) n_thr++;
    chk(thr == (occ >= 5'(thr_events)), "throttle follows occupancy");
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of one event
  task automatic model(input logic [PTR_W-1:0] p, input logic [15:0] id, input bit r);
    logic [31:0] w0, w1;
    logic [7:0] s [128];
    logic [127:0] h;
    logic [15:0] body [$];
    logic [7:0] bytes [$];
    int ndaq, m, c;
    bit t;
    w0 = mem[{p, 6'd0}]; w1 = mem[{p, 6'd1}];
    for (int ch = 0; ch < 128; ch++) s[ch] = mem[{p, 6'(33 - ch % 32)}][8*(ch/32) +: 8];
    for (int k = 0; k < 4; k++) h[32*k +: 32] = mem[{p, 6'(34 + k)}];
    ndaq = 0;
    if (!z_mode) begin
      c = 0;
      while (c < 128) begin
        if (int'(s[c]) > int'(ped[c]) + int'(zs_thr)) begin
          logic [7:0] v [$];
          int a = c;
          v.delete();
          while (c < 128 && v.size() < 7 && int'(s[c]) > int'(ped[c]) + int'(zs_thr)) begin
            v.push_back(8'(s[c] - ped[c])); c++;
          end
          body.push_back({6'b0, 3'(v.size()), 7'(a)});
          for (int k = 0; k < v.size(); k += 2)
            body.push_back({(k + 1 < v.size()) ? v[k+1] : 8'h00, v[k]});
          ndaq++;
        end else c++;
      end
    end
    // L1 trigger clusters
    bytes.delete(); m = 0; t = 0; c = 0;
    while (c < 128) begin
      if (h[c]) begin
        if (m == int'(cl_limit)) begin t = 1; break; end
        if (c < 127 && h[c+1]) begin bytes.push_back({1'b1, 7'(c)}); c += 2; end
        else begin bytes.push_back({1'b0, 7'(c)}); c++; end
        m++;
      end else c++;
    end
    for (int k = 0; k < bytes.size(); k += 2)
      body.push_back({(k + 1 < bytes.size()) ? bytes[k+1] : 8'h00, bytes[k]});
    // non-processed samples
    begin
      int n = z_mode ? 128 : ((np_count > 128) ? 128 : int'(np_count));
      int f = z_mode ? 0 : 4 * int'(id[4:0]);
      for (int k = 0; k < n; k += 2)
        body.push_back({(k + 1 < n) ? s[(f + k + 1) % 128] : 8'h00, s[(f + k) % 128]});
    end
    expw.push_back(id);
    expw.push_back({w1[27:24], w0[11:0]});
    expw.push_back({r, z_mode, 2'b00, w0[27:16]});
    expw.push_back({w1[7:0], 8'(ndaq)});
    expw.push_back({t, 7'(m), 8'h00});
    foreach (body[i]) expw.push_back(body[i]);
  endtask

  task automatic fill(input logic [PTR_W-1:0] p, input logic [11:0] l0id, input int occ_hits);
    mem[{p, 6'd0}] = {4'b0, 12'($urandom), 4'b0, l0id};
    mem[{p, 6'd1}] = {4'b0, 4'($urandom), 16'b0, 8'($urandom)};
    for (int w = 2; w < 34; w++) begin
      logic [31:0] x;
      for (int b = 0; b < 4; b++)
        x[8*b +: 8] = (($urandom % 100) < occ_hits) ? 8'(100 + $urandom % 150) : 8'(40 + $urandom % 30);
      mem[{p, 6'(w)}] = x;
    end
    for (int k = 0; k < 4; k++) begin
      logic [31:0] x = '0;
      for (int b = 0; b < 32; b++) x[b] = ($urandom % 100) < occ_hits;
      mem[{p, 6'(34 + k)}] = x;
    end
  endtask

  logic [15:0] ref_id = '0;
  bit ref_r = 1;

  task automatic accept(input logic [PTR_W-1:0] p, input int occ_hits, input bit bad);
    logic [11:0] l0id = 12'($urandom);
    fill(p, l0id, occ_hits);
    ref_id++;
    model(p, ref_id, ref_r);
    ref_r = 0;
    @(negedge clk);
    l1a_valid = 1; l1a_ptr = p;
    l1a_info = {3'd1 + 3'($urandom % 7), bad ? ~l0id[1:0] : l0id[1:0]};
    @(negedge clk);
    l1a_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < 128; i++) ped[i] = 8'(50 + $urandom % 20);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); ped_we = 1; ped_addr = 7'(i); ped_wdata = ped[i];
    end
    @(negedge clk); ped_we = 0;

    // phase 1: random events, random back pressure, events 40 clocks apart
    // unless the throttle is raised
    for (int ev = 0; ev < 200; ev++) begin
      // configuration only changes when the DSP is empty
      if (ev % 25 == 0) begin
        while (expw.size() != 0 || occ != 0) @(negedge clk);
        z_mode = (ev % 100) == 50;
        np_count = 8'($urandom % 140);
        cl_limit = (ev % 50 == 25) ? 7'(1 + $urandom % 10) : 7'd64;
        zs_thr = 8'(10 + $urandom % 40);
      end
      while (thr) begin             // the throttle stops further triggers
        @(negedge clk); ofull = ($urandom % 4) == 0;
      end
      accept(PTR_W'($urandom), int'($urandom % 40), ev == 77);
      repeat (38) begin
        @(negedge clk); ofull = ($urandom % 4) == 0;
      end
    end
    ofull = 0;
    while (expw.size() != 0 || occ != 0) @(negedge clk);
    chk(l0e && nl0e == 1, "wrong L0ID flagged once");

    $display("phase1 done %0t", $time);
    // phase 2: DAQ side full for a long time -> derandomizer fills, throttle
    ofull = 1;
    n_thr = 0;
    for (int ev = 0; ev < 16; ev++) begin
      accept(11'(ev * 3), 10, 0);
      repeat (38) @(negedge clk);
    end
    chk(n_thr > 0 && thr && occ == 16, "throttle raised at the threshold");
    repeat (2000) @(negedge clk);
    ofull = 0;
    while (expw.size() != 0 || occ != 0) @(negedge clk);
    chk(!thr, "throttle released");

    $display("phase2 done %0t", $time);
    // phase 3: L1_Reset restarts L1ID and sets R; clears the error flag
    @(negedge clk); l1_reset = 1; @(negedge clk); l1_reset = 0;
    ref_id = 0; ref_r = 1;
    chk(!l0e && l1id == 0, "L1_Reset clears");
    for (int ev = 0; ev < 10; ev++) begin
      accept(PTR_W'($urandom), 20, 0);
      repeat (60) @(negedge clk);
    end
    while (expw.size() != 0 || occ != 0) @(negedge clk);
    chk(l1id == 10, "L1ID counts accepts");
    chk(n_words > 10000, "enough words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
