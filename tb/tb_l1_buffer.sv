// tb_l1_buffer: writes events into random slots of the full 128K x 32
// buffer and reads them back with the one-clock read latency, against an
// associative-array model; includes the first and last slot.
module tb_l1_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic we = 0, re = 0;
  logic [16:0] wa = 0, ra = 0;
  logic [31:0] wd = 0, rd;

  l1_buffer dut (.clk, .we, .waddr(wa), .wdata(wd), .re, .raddr(ra), .rdata(rd));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model [int];
    int addrs [$];
    for (int e = 0; e < 200; e++) begin
      logic [10:0] slot;
      slot = (e == 0) ? 11'd0 : (e == 1) ? 11'h7FF : 11'($urandom);
      for (int w = 0; w < 38; w++) begin
        @(negedge clk);
        we = 1; wa = {slot, 6'(w)}; wd = $urandom;
        model[int'(wa)] = wd;
        addrs.push_back(int'(wa));
      end
    end
    @(negedge clk); we = 0;
    foreach (addrs[i]) begin
      @(negedge clk);
      re = 1; ra = 17'(addrs[i]);
      @(negedge clk);
      re = 0;
      chk(rd == model[addrs[i]], $sformatf("read %h", addrs[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
