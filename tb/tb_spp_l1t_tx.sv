// tb_spp_l1t_tx: random event headers and cluster lists (served from a
// model of the encoder's list); the bytes on the bus must follow the
// three-byte header layout and the cluster list, and an event of N
// clusters must take N+3 consecutive bus clocks.
module tb_spp_l1t_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  import l1_pkg::*;
  logic start = 0, tr = 0;
  logic [11:0] l0id = 0;
  logic [1:0] bc = 0, er = 0;
  logic [6:0] n = 0;
  logic [5:0] idx;
  cluster_t list [64];
  cluster_t cl;
  logic busy, v;
  logic [7:0] d;
  assign cl = list[idx];

  spp_l1t_tx dut (.clk, .rst_n, .start, .l0id, .bcid_lsb(bc), .error(er), .n, .trunc(tr),
    .rd_idx(idx), .rd_cl(cl), .busy, .tx_data(d), .tx_valid(v));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expb [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      l0id = 12'($urandom); bc = 2'($urandom); er = 2'($urandom); tr = 1'($urandom);
      n = (it % 7 == 0) ? 7'd64 : 7'($urandom % 10);
      for (int k = 0; k < 64; k++) list[k] = cluster_t'($urandom);
      expb.delete();
      expb.push_back(l0id[7:0]);
      expb.push_back({er, bc, l0id[11:8]});
      expb.push_back({tr, n});
      for (int k = 0; k < int'(n); k++) expb.push_back(list[k]);
      @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      chk(!v, "no byte in the clock of start");
      @(negedge clk);
      foreach (expb[k]) begin
        chk(v && d == expb[k], $sformatf("byte %0d: %02x vs %02x", k, d, expb[k]));
        @(negedge clk);
      end
      chk(!v, "event ends after N+3 bytes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
