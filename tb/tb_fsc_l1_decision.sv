// tb_fsc_l1_decision: random L1 decisions; the expected slot pointer of
// each accept is the number of decisions since the last L1_Reset, modulo
// 2048.  Runs past a pointer wrap and through an L1_Reset.  Checks the
// one-clock latency of l1a_valid.
module tb_fsc_l1_decision;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic l1r = 0, dv = 0;
  logic [2:0] typ = 0;
  logic [1:0] l0 = 0;
  logic av;
  logic [4:0] info;
  logic [10:0] ptr;
  logic [31:0] nd, na;

  fsc_l1_decision dut (.clk, .rst_n, .l1_reset(l1r), .l1_dec_valid(dv), .l1_dec_type(typ),
    .l1_dec_l0id(l0), .l1a_valid(av), .l1a_info(info), .l1a_ptr(ptr), .n_decisions(nd), .n_accepts(na));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int count = 0, acc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      if (it == 3000) begin
        l1r = 1; @(negedge clk); l1r = 0; count = 0; acc = 0;
      end
      dv = 1; typ = 3'($urandom); l0 = 2'($urandom);
      @(negedge clk);
      dv = 0;
      chk(av == (typ != 0), "accept iff type != 0");
      if (typ != 0) begin
        chk(ptr == 11'(count), $sformatf("pointer %0d vs %0d", ptr, count));
        chk(info == {typ, l0}, "info bits");
        acc++;
      end
      count++;
    end
    @(negedge clk);
    chk(nd == 32'(count) && na == 32'(acc), "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
