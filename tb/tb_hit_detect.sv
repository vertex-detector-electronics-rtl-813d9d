// tb_hit_detect: loads a random pedestal table, then checks random
// samples on the four lanes against sample - pedestal > threshold,
// including samples below the pedestal.
module tb_hit_detect;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic we = 0;
  logic [6:0] wa = 0;
  logic [7:0] wd = 0, thr = 20;
  logic [3:0][7:0] s;
  logic [3:0][6:0] ch;
  logic [3:0] hit;

  hit_detect dut (.clk, .ped_we(we), .ped_addr(wa), .ped_wdata(wd), .threshold(thr),
    .sample(s), .channel(ch), .hit);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ped [128];
    int n_hit = 0, n_no = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1; wa = 7'(i); wd = 8'($urandom % 200); ped[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int it = 0; it < 3000; it++) begin
      thr = 8'($urandom % 60);
      for (int k = 0; k < 4; k++) begin
        ch[k] = 7'($urandom);
        s[k]  = 8'($urandom);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        bit e;
        e = int'(s[k]) - int'(ped[ch[k]]) > int'(thr);
        chk(hit[k] == e, "hit");
        if (e) n_hit++; else n_no++;
      end
      @(negedge clk);
    end
    chk(n_hit > 100 && n_no > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
