// tb_board_ready: BOARD_READY must be high exactly when every ready input
// has been high for the two synchroniser clocks.
module tb_board_ready;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic ttc = 0, ecs = 0;
  logic [18:0] init = '0;
  logic [15:0] dsp = '0;
  logic [1:0]  ld = '0;
  logic ready;
  logic [38:0] status;

  board_ready dut (.clk, .rst_n, .ttc_ready(ttc), .init_done(init), .dsp_ready(dsp),
    .ecs_ready(ecs), .ldown_n(ld), .board_ready_o(ready), .status);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [38:0] hist [3];
    int n_up = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) hist[i] = '0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      // mostly all ready, sometimes one input low
      {ld, ecs, dsp, init, ttc} = '1;
      if (($urandom % 3) == 0) begin
        logic [38:0] v;
        v = {ld, ecs, dsp, init, ttc};
        v[$urandom % 39] = 1'b0;
        {ld, ecs, dsp, init, ttc} = v;
      end
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = {ld, ecs, dsp, init, ttc};
      @(posedge clk); #1;
      if (it >= 2) begin
        chk(ready == (&hist[1]), "AND after two clocks");
        if (ready) n_up++;
      end
    end
    chk(n_up > 100, "ready seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
