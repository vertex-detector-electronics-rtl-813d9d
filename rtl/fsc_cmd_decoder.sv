// fsc_cmd_decoder: TTC broadcast command decoder of the fast and slow
// control FPGA.
//
// The TTC receiver presents broadcast command bits CMD<7..2> on its Brcst
// bus with the strobe BrcstStr1.  A command with CMD<7> = 1 is an L1
// trigger decision: CMD<6..4> give the trigger type and CMD<3..2> the two
// low bits of the L0 event number.  A command with CMD<7..6> = 01 is a
// reset command in which each set bit asks for one reset: bit 2 L0_Reset,
// bit 3 L1_Reset, bit 4 L1ID_Reset.  L0_Reset drives the front-end emulator
// reset for FEM_RST_CYCLES clocks (two, as the board description asks);
// all other outputs are one-clock pulses.
//
// Timing: every output appears one clock after the strobe.  Reset commands
// with CMD<7..6> = 00 or 11 (other than decisions) are ignored.  Holding
// several reset bits in one command, and the registered outputs, are this
// design's choices.
module fsc_cmd_decoder #(
  parameter int unsigned FEM_RST_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:2] brcst,
  input  logic       brcst_str1,
  output logic       fem_l0_reset,   // FEM_RST_CYCLES wide
  output logic       l0_reset,       // 1 clock
  output logic       l1_reset,
  output logic       l1id_reset,
  output logic       l1_dec_valid,
  output logic [2:0] l1_dec_type,
  output logic [1:0] l1_dec_l0id
);
  import l1_pkg::*;

  logic is_reset_cmd, is_decision;
  logic [$clog2(FEM_RST_CYCLES+1)-1:0] fem_cnt;

  assign is_reset_cmd = brcst_str1 && (brcst[7:6] == 2'b01);
  assign is_decision  = brcst_str1 && brcst[CMD_L1_DECISION];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l0_reset     <= 1'b0;
      l1_reset     <= 1'b0;
      l1id_reset   <= 1'b0;
      l1_dec_valid <= 1'b0;
      l1_dec_type  <= '0;
      l1_dec_l0id  <= '0;
      fem_cnt      <= '0;
    end else begin
      l0_reset     <= is_reset_cmd && brcst[CMD_L0_RESET];
      l1_reset     <= is_reset_cmd && brcst[CMD_L1_RESET];
      l1id_reset   <= is_reset_cmd && brcst[CMD_L1ID_RESET];
      l1_dec_valid <= is_decision;
      if (is_decision) begin
        l1_dec_type <= brcst[6:4];
        l1_dec_l0id <= brcst[3:2];
      end
      if (is_reset_cmd && brcst[CMD_L0_RESET])
        fem_cnt <= ($bits(fem_cnt))'(FEM_RST_CYCLES);
      else if (fem_cnt != 0)
        fem_cnt <= fem_cnt - 1'b1;
    end
  end

  assign fem_l0_reset = (fem_cnt != 0);

endmodule
