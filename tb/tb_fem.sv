// tb_fem: L0 accepts at random times.  The PCN of each accept is
// predicted by a clock count since the last L0_Reset (mod 256); every
// readout must deliver that PCN as two nibbles, high first, in order,
// with FRAME_CYCLES clocks between readout starts while events wait.
// An L0_Reset in the middle clears the counter and the queue.
module tb_fem;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int FRAME = 54;
  logic l0r = 0, acc = 0;
  logic [3:0] nib;
  logic dv, ovf, busy;
  logic [7:0] pcn;

  fem #(.FRAME_CYCLES(FRAME)) dut (.clk, .rst_n, .l0_reset(l0r), .l0_accept(acc),
    .nib, .dv, .pcn, .derand_ovf(ovf), .busy);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] expq [$];
  int cyc = 0;           // clocks since L0_Reset / reset
  always @(posedge clk) cyc <= (!rst_n || l0r) ? 0 : cyc + 1;
  int n_read = 0, last_start = -1000, n_b2b = 0;
  bit hi_phase = 1'b1;
  logic [3:0] hi;

  // model and monitor, sampled at negedge
  always @(negedge clk) if (rst_n) begin
    if (dv) begin
      if (hi_phase) begin
        hi = nib;
        if (cyc - last_start == FRAME) n_b2b++;
        if (last_start >= 0 && expq.size() > 0) chk(cyc - last_start >= FRAME, $sformatf("frame spacing %0d", cyc - last_start));
        last_start = cyc;
      end else begin
        chk(expq.size() > 0, "readout without accept");
        if (expq.size() > 0) begin
          chk({hi, nib} == expq[0], $sformatf("PCN %02x vs %02x", {hi, nib}, expq[0]));
          void'(expq.pop_front());
        end
        n_read++;
      end
      hi_phase = !hi_phase;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 8000; it++) begin
      @(negedge clk);
      if (it == 4000) begin
        l0r = 1; @(negedge clk); @(negedge clk); l0r = 0;
        expq.delete(); hi_phase = 1; last_start = -1000;
      end
      acc = ($urandom % 30) == 0 && expq.size() < 15;
      if (acc) begin
        expq.push_back(8'(cyc));
        chk(pcn == 8'(cyc), "pcn counter");
      end
      @(posedge clk); #1 acc = 0;
    end
    repeat (16 * FRAME + 10) @(negedge clk);
    chk(expq.size() == 0, "all events read out");
    chk(n_read > 100, "events read");
    chk(n_b2b > 3, "back-to-back readouts");
    chk(!ovf, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
