// tb_cluster_encoder: random hit maps of several densities (empty, sparse,
// dense, all channels) against a reference scan written here: from channel
// 0 upwards, a hit followed by a hit forms a two-channel cluster, else a
// one-channel one.  Checks the list, the count, the truncation flag for
// the cluster limit and for the time-out, and that the encoder needs one
// clock per cluster (done = clusters + 2 clocks after start).
module tb_cluster_encoder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  import l1_pkg::*;
  logic start = 0, ten = 0;
  logic [127:0] hits = '0;
  logic [6:0] limit = 64;
  logic [7:0] tmo = 16;
  logic busy, done, trunc;
  logic [6:0] n;
  logic [5:0] idx = 0;
  cluster_t cl;

  cluster_encoder dut (.clk, .rst_n, .start, .hits, .limit, .timeout_en(ten), .timeout(tmo),
    .busy, .done, .cl_n(n), .trunc, .rd_idx(idx), .rd_cl(cl));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cluster_t ref_l [$];
    int keep, cyc, n_lim = 0, n_tmo = 0, n_full = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 1500; it++) begin
      case (it % 5)
        0: hits = '0;
        1: for (int i = 0; i < 128; i++) hits[i] = ($urandom % 40) == 0;
        2: for (int i = 0; i < 128; i++) hits[i] = ($urandom % 4) == 0;
        3: for (int i = 0; i < 128; i++) hits[i] = ($urandom % 3) != 0;
        default: hits = (it % 10 == 4) ? '1 : {4{32'($urandom)}};
      endcase
      limit = (it % 3 == 0) ? 7'd64 : 7'($urandom % 70);
      ten   = (it % 4 == 1);
      tmo   = 8'($urandom % 40);
      ref_l.delete();
      for (int i = 0; i < 128; i++)
        if (hits[i]) begin
          if (i < 127 && hits[i+1]) begin ref_l.push_back('{s: 1'b1, addr: 7'(i)}); i++; end
          else ref_l.push_back('{s: 1'b0, addr: 7'(i)});
        end
      keep = ref_l.size();
      if (keep > int'(limit)) keep = int'(limit);
      if (ten && keep > int'(tmo)) keep = int'(tmo);
      if (ref_l.size() == 64) n_full++;
      @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(n == 7'(keep), $sformatf("count %0d vs %0d", n, keep));
      chk(trunc == (ref_l.size() > keep), "truncation flag");
      chk(cyc == keep + 2, $sformatf("latency %0d for %0d clusters", cyc, keep));
      if (ref_l.size() > keep) begin
        if (ten && keep == int'(tmo) && tmo < limit) n_tmo++; else n_lim++;
      end
      for (int k = 0; k < keep; k++) begin
        idx = 6'(k); #1;
        chk(cl == ref_l[k], $sformatf("cluster %0d", k));
      end
    end
    chk(n_lim > 10 && n_tmo > 10 && n_full > 10, "limit, time-out and full-map cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
