// tb_throttle_ctrl: random throttle inputs and enable masks; the global
// throttle must be the OR of the enabled inputs one clock later, and each
// counter must equal the number of rising edges of its input.
module tb_throttle_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int N = 16;
  logic clr = 0;
  logic [N-1:0] thr = '0, mask = '1;
  logic tout;
  logic [N-1:0][15:0] cnt;

  throttle_ctrl #(.N(N), .CNT_W(16)) dut (.clk, .rst_n, .clr, .throttle_in(thr), .mask_en(mask),
    .throttle_out(tout), .counts(cnt));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cnt [N];
    logic [N-1:0] prev = '0;
    int n_glob = 0;
    foreach (exp_cnt[i]) exp_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (it % 100 == 0) mask = N'($urandom);
      // sparse throttles
      for (int i = 0; i < N; i++) if (($urandom % 8) == 0) thr[i] = !thr[i];
      for (int i = 0; i < N; i++) if (thr[i] && !prev[i]) exp_cnt[i]++;
      prev = thr;
      @(negedge clk);
      chk(tout == |(thr & mask), "global OR of enabled throttles");
      if (tout) n_glob++;
    end
    for (int i = 0; i < N; i++) chk(cnt[i] == 16'(exp_cnt[i]), $sformatf("counter %0d", i));
    clr = 1; @(negedge clk); clr = 0; @(negedge clk);
    chk(cnt == '0, "clear");
    chk(n_glob > 10, "global throttle seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
