// tb_fsc_cmd_decoder: random TTC broadcast commands against a reference
// decoding written from the command table (CMD<7> = decision,
// CMD<7..6> = 01 reset with bit 2 L0, bit 3 L1, bit 4 L1ID).  Checks every
// output one clock after the strobe, that nothing fires without the
// strobe, and that the FEM reset is exactly two clocks wide.
module tb_fsc_cmd_decoder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:2] brcst = '0;
  logic       str = 1'b0;
  logic       fem_rst, l0r, l1r, l1idr, dv;
  logic [2:0] typ;
  logic [1:0] l0;

  fsc_cmd_decoder dut (.clk, .rst_n, .brcst, .brcst_str1(str),
    .fem_l0_reset(fem_rst), .l0_reset(l0r), .l1_reset(l1r), .l1id_reset(l1idr),
    .l1_dec_valid(dv), .l1_dec_type(typ), .l1_dec_l0id(l0));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fem_len;
  initial begin
    logic [7:0] cmd;
    bit s;
    int n_l0 = 0, n_dec = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      cmd = 8'($urandom);
      if (it % 4 == 0) cmd[7:6] = 2'b01;
      s = ($urandom % 5) != 0;
      brcst = cmd[7:2];
      str   = s;
      @(negedge clk);
      str = 1'b0;
      chk(l0r   == (s && cmd[7:6] == 2'b01 && cmd[2]), "L0_Reset");
      chk(l1r   == (s && cmd[7:6] == 2'b01 && cmd[3]), "L1_Reset");
      chk(l1idr == (s && cmd[7:6] == 2'b01 && cmd[4]), "L1ID_Reset");
      chk(dv    == (s && cmd[7]), "decision strobe");
      if (s && cmd[7]) begin
        chk(typ == cmd[6:4] && l0 == cmd[3:2], "decision fields");
        n_dec++;
      end
      if (s && cmd[7:6] == 2'b01 && cmd[2]) begin
        // FEM reset width: high now, count clocks
        fem_len = 0;
        while (fem_rst) begin fem_len++; @(negedge clk); end
        chk(fem_len == 2, $sformatf("FEM reset width %0d", fem_len));
        n_l0++;
      end else begin
        @(negedge clk);
        chk(!fem_rst, "no FEM reset");
      end
    end
    chk(n_l0 > 20 && n_dec > 20, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
