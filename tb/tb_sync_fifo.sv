// tb_sync_fifo: random writes and reads against a queue model, at the
// 8x256 size of the L1 trigger input buffers; fills the FIFO to check
// the full flag, the dropped write and the sticky overflow flag, and
// checks clr.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int D = 256;
  logic clr = 0, we = 0, re = 0;
  logic [7:0] din = 0, dout;
  logic empty, full, ovf;
  logic [8:0] count;

  sync_fifo #(.W(8), .DEPTH(D)) dut (.clk, .rst_n, .clr, .wr_en(we), .din, .rd_en(re),
    .dout, .empty, .full, .count, .overflow(ovf));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q [$];
    int n_full = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 8000; it++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0) && full == (q.size() == D) && count == 9'(q.size()), "flags");
      if (q.size() > 0) chk(dout == q[0], "head");
      if (full) n_full++;
      // phases: fill, drain, random
      if (it < 300)       begin we = 1; re = 0; end
      else if (it < 600)  begin we = 0; re = 1; end
      else                begin we = $urandom % 2; re = $urandom % 2; end
      din = 8'($urandom);
      if (it == 256) chk(!ovf, "no overflow yet");
      if (it == 257) chk(ovf, "overflow after writing a full FIFO");
      @(posedge clk);
      if (re && q.size() > 0) void'(q.pop_front());
      if (we && q.size() < D + (re ? 1 : 0)) q.push_back(din);
    end
    @(negedge clk); we = 0; re = 0; clr = 1; @(negedge clk); clr = 0;
    chk(empty && !ovf, "clear");
    chk(n_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
