// tb_fsc_tagger: plays TTC receiver and front-end emulator.  Each event:
// an L0 accept, BCntStr with a random bunch number two clocks later, and
// some clocks later the PCN as two nibbles.  Each tag must appear exactly
// FE_LATENCY clocks after the second nibble with L0ID = 1, 2, ... and the
// matching BCID and PCN.  EvCntRes and an ECS write restart the count.
module tb_fsc_tagger;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  import l1_pkg::*;
  localparam int LAT = 8;
  logic acc = 0, l0r = 0, evr = 0, ecsw = 0, bstr = 0, dv = 0;
  logic [11:0] bcnt = 0, l0id;
  logic [3:0] nib = 0;
  logic tv, terr;
  ev_tag_t tag;

  fsc_tagger #(.FE_LATENCY(LAT)) dut (.clk, .rst_n, .l0_accept(acc), .l0_reset(l0r),
    .l0id_reset(evr), .ecs_l0id_wr(ecsw), .bcnt, .bcnt_str(bstr), .fem_nib(nib), .fem_dv(dv),
    .l0id, .tag_valid(tv), .tag, .tag_error(terr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ev_tag_t expq [$];
  int      due  [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (tv) begin
      chk(expq.size() > 0, "unexpected tag");
      if (expq.size() > 0) begin
        chk(tag == expq[0], $sformatf("tag %h vs %h", tag, expq[0]));
        chk(cyc == due[0], $sformatf("tag latency %0d vs %0d", cyc, due[0]));
        void'(expq.pop_front()); void'(due.pop_front());
      end
    end
  end

  initial begin
    int ev = 0;
    logic [11:0] b;
    logic [7:0] p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      if (it == 150) begin evr = 1; @(negedge clk); evr = 0; ev = 0; end
      if (it == 300) begin ecsw = 1; @(negedge clk); ecsw = 0; ev = 0; end
      @(negedge clk);
      acc = 1; @(negedge clk); acc = 0; ev++;
      @(negedge clk);
      b = 12'($urandom); bcnt = b; bstr = 1; @(negedge clk); bstr = 0;
      chk(l0id == 12'(ev), "L0ID counter");
      repeat ($urandom % 5) @(negedge clk);
      p = 8'($urandom);
      nib = p[7:4]; dv = 1; @(negedge clk);
      nib = p[3:0];
      expq.push_back('{l0id: 12'(ev), bcid: b, pcn: p});
      due.push_back(cyc + LAT);
      @(negedge clk); dv = 0;
    end
    repeat (LAT + 5) @(negedge clk);
    chk(expq.size() == 0, "all tags out");
    chk(!terr, "no tag error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
