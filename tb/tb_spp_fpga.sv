// tb_spp_fpga: whole preprocessor FPGA.  Events of varied hit density
// arrive every 41 clocks; for each, the bytes on the L1 trigger bus must
// be the three-byte header (L0ID, Error/BCID, T/N) and the clusters of a
// reference scan written here, cut at the ECS limit or, with the time-out
// on, at 16 clusters.  Also checks 38 L1 buffer writes per event, the
// Error<0> bit for a PCN error and that no event is lost.
module tb_spp_fpga;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  import l1_pkg::*;
  logic l1r = 0, tv = 0, pwe = 0, ten = 1;
  logic [3:0][7:0] ld = '0;
  logic [3:0] lv = '0;
  ev_tag_t tag = '0;
  logic [6:0] lim = 64, pa = 0;
  logic bwe, l1tv, ovr, lost, forced;
  logic [16:0] ba;
  logic [31:0] bd;
  logic [7:0] l1td;
  logic [3:0] serr;

  spp_fpga dut (.clk, .rst_n, .l1_reset(l1r), .link_data(ld), .link_valid(lv),
    .tag_valid(tv), .tag, .ped_we(pwe), .ped_addr(pa), .ped_wdata(8'd0), .threshold(8'd50),
    .cl_limit(lim), .timeout_en(ten),
    .buf_we(bwe), .buf_addr(ba), .buf_wdata(bd), .l1t_data(l1td), .l1t_valid(l1tv),
    .sync_err(serr), .overrun(ovr), .forced(forced), .lost(lost));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] expb [$];
  int nwr = 0, nbytes = 0, cur_ev = 0;
  always @(posedge clk) if (bwe) nwr++;
  always @(negedge clk) if (l1tv) begin
    nbytes++;
    chk(expb.size() > 0, "unexpected byte");
    if (expb.size() > 0) begin
      chk(l1td == expb[0], $sformatf("L1T byte %02x vs %02x in event %0d", l1td, expb[0], cur_ev));
      void'(expb.pop_front());
    end
  end

  initial begin
    logic [127:0] h;
    cluster_t rl [$];
    int keep, n_trunc = 0, n_cl = 0, n_err = 0;
    bit bad;
    repeat (3) @(negedge clk);
    // pedestals: all zero
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); pwe = 1; pa = 7'(i);
    end
    @(negedge clk); pwe = 0;
    for (int ev = 0; ev < 1000; ev++) begin
      int dens;
      dens = (ev % 10 == 9) ? 2 : (ev % 10 == 8) ? 6 : 60;
      for (int c = 0; c < 128; c++) h[c] = ($urandom % dens) == 0;
      lim = (ev % 3 == 0) ? 7'($urandom % 8) : 7'd64;
      ten = (ev % 2 == 0);
      bad = (ev % 7 == 0);
      tag = '{l0id: 12'($urandom), bcid: 12'($urandom), pcn: 8'($urandom)};
      rl.delete();
      for (int i = 0; i < 128; i++)
        if (h[i]) begin
          if (i < 127 && h[i+1]) begin rl.push_back('{s: 1'b1, addr: 7'(i)}); i++; end
          else rl.push_back('{s: 1'b0, addr: 7'(i)});
        end
      keep = rl.size();
      if (keep > int'(lim)) keep = int'(lim);
      if (ten && keep > 16) keep = 16;
      if (keep < rl.size()) n_trunc++;
      n_cl += keep;
      if (bad) n_err++;
      expb.push_back(tag.l0id[7:0]);
      expb.push_back({1'b0, bad, tag.bcid[1:0], tag.l0id[11:8]});
      expb.push_back({keep < rl.size(), 7'(keep)});
      for (int k = 0; k < keep; k++) expb.push_back(rl[k]);
      nwr = 0; cur_ev = ev;
      @(negedge clk);
      tv = 1; @(negedge clk); tv = 0;
      for (int w = 0; w < 34; w++) begin
        lv = '1;
        for (int k = 0; k < 4; k++)
          ld[k] = (w == 0) ? {4'h0, tag.pcn[7:4] ^ ((bad && k == 2) ? 4'h1 : 4'h0)}
                : (w == 1) ? {4'h0, tag.pcn[3:0]}
                : (h[32*k + 33 - w] ? 8'd200 : 8'd10);
        @(negedge clk);
      end
      lv = '0;
      repeat (6) @(negedge clk);
      chk(nwr == 38, "38 L1 buffer writes");
      // the ECS changes the limit only between events
      while (expb.size() != 0) @(negedge clk);
      repeat (2) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    chk(expb.size() == 0, "all L1T bytes sent");
    chk(!lost && !ovr && !forced, "nothing lost");
    chk(n_trunc > 50 && n_cl > 500 && n_err > 50, "truncation, clusters and errors seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
