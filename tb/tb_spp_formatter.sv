// tb_spp_formatter: plays the flash ADCs of one chip.  Each event has
// random amplitudes, a random PCN sent on the links (sometimes wrong on
// one link) and a random tag from the fast-control FPGA.  The L1 buffer
// writes are collected in a model memory; after each event its 38-word
// slot must match the documented layout, exactly 38 writes must have
// happened, and the hit map, E flags and slot handed on must be right.
// Slots wrap past 2047 and restart after L1_Reset.
module tb_spp_formatter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  import l1_pkg::*;
  logic l1r = 0, tv = 0, pwe = 0;
  logic [3:0][7:0] ld = '0;
  logic [3:0] lv = '0;
  ev_tag_t tag = '0;
  logic [6:0] pa = 0;
  logic [7:0] pd = 0, thr = 30;
  logic bwe, evv, ovr;
  logic [16:0] ba;
  logic [31:0] bd;
  logic [127:0] eh;
  ev_tag_t et;
  logic [3:0] ee;
  logic [10:0] es;

  spp_formatter dut (.clk, .rst_n, .l1_reset(l1r), .link_data(ld), .link_valid(lv),
    .tag_valid(tv), .tag, .ped_we(pwe), .ped_addr(pa), .ped_wdata(pd), .threshold(thr),
    .buf_we(bwe), .buf_addr(ba), .buf_wdata(bd),
    .ev_valid(evv), .ev_hits(eh), .ev_tag(et), .ev_err(ee), .ev_slot(es), .overrun(ovr));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mem [int];
  int nwr = 0;
  always @(posedge clk) if (bwe) begin mem[int'(ba)] = bd; nwr++; end

  logic ev_seen;
  logic [127:0] ev_h; ev_tag_t ev_t; logic [3:0] ev_e; logic [10:0] ev_s;
  always @(posedge clk) if (evv) begin ev_seen = 1; ev_h = eh; ev_t = et; ev_e = ee; ev_s = es; end

  initial begin
    logic [7:0] ped [128];
    logic [7:0] amp [128];
    logic [7:0] lpcn [4];
    logic [127:0] h;
    logic [3:0] e;
    int slot = 0, n_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); pwe = 1; pa = 7'(i); pd = 8'($urandom % 100); ped[i] = pd;
    end
    @(negedge clk); pwe = 0;
    for (int ev = 0; ev < 2200; ev++) begin
      if (ev == 2100) begin l1r = 1; @(negedge clk); l1r = 0; slot = 0; end
      tag = '{l0id: 12'($urandom), bcid: 12'($urandom), pcn: 8'($urandom)};
      for (int k = 0; k < 4; k++) lpcn[k] = tag.pcn;
      if (ev % 5 == 3) begin lpcn[$urandom % 4] ^= 8'(1 << ($urandom % 8)); end
      for (int c = 0; c < 128; c++) amp[c] = 8'($urandom % 160);
      for (int c = 0; c < 128; c++) h[c] = int'(amp[c]) - int'(ped[c]) > int'(thr);
      for (int k = 0; k < 4; k++) e[k] = lpcn[k] != tag.pcn;
      if (e != 0) n_err++;
      nwr = 0; ev_seen = 0;
      @(negedge clk);
      tv = 1; @(negedge clk); tv = 0;
      for (int w = 0; w < 34; w++) begin
        lv = '1;
        for (int k = 0; k < 4; k++)
          ld[k] = (w == 0) ? {4'h0, lpcn[k][7:4]} : (w == 1) ? {4'h0, lpcn[k][3:0]}
                                                       : amp[32*k + 33 - w];
        @(negedge clk);
      end
      lv = '0;
      repeat (6) @(negedge clk);
      chk(nwr == 38, $sformatf("38 writes per event, got %0d", nwr));
      chk(ev_seen && ev_h == h && ev_e == e && ev_s == 11'(slot), "event hand-off");
      chk(ev_t.l0id == tag.l0id && ev_t.bcid == tag.bcid && ev_t.pcn == lpcn[0], "event tag");
      begin
        int b;
        b = (slot % 2048) * 64;
        chk(mem[b] == {4'b0, tag.bcid, 4'b0, tag.l0id}, "header word 1");
        chk(mem[b+1] == {4'b0, e, 16'b0, lpcn[0]}, "header word 2");
        for (int j = 0; j < 32; j++)
          chk(mem[b+2+j] == {amp[127-j], amp[95-j], amp[63-j], amp[31-j]}, $sformatf("data word %0d", j));
        for (int k = 0; k < 4; k++)
          chk(mem[b+34+k] == h[32*k +: 32], "hit word");
      end
      slot = (slot + 1) % 2048;
    end
    chk(!ovr, "no overrun at 40 clocks per event");
    chk(n_err > 100, "sync errors seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
