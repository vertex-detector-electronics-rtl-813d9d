// board_ready: BOARD_READY generation.
//
// BOARD_READY is the AND of the ready signals of all board components:
// TTCReady of the TTC receiver, INIT_DONE of each FPGA, DSP_READY of each
// DSP, ECS_READY of the ECS interface and LDOWN# of the two S-LINK source
// cards.  The inputs come from separate chips, so each passes through a
// two-stage synchroniser before the AND; BOARD_READY therefore follows the
// last ready input by two clocks and drops two clocks after any input
// drops.  The individual synchronised bits are also given for the board
// status register.  The synchroniser is this design's choice.
module board_ready #(
  parameter int unsigned N_FPGA = 19,   // FSC, 16 SPP, L1T, DAQ
  parameter int unsigned N_DSP  = 16,
  parameter int unsigned N_LINK = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ttc_ready,
  input  logic [N_FPGA-1:0] init_done,
  input  logic [N_DSP-1:0]  dsp_ready,
  input  logic              ecs_ready,
  input  logic [N_LINK-1:0] ldown_n,
  output logic              board_ready_o,
  output logic [N_FPGA+N_DSP+N_LINK+1:0] status
);
  localparam int unsigned NB = N_FPGA + N_DSP + N_LINK + 2;
  logic [NB-1:0] raw, s1;

  assign raw = {ldown_n, ecs_ready, dsp_ready, init_done, ttc_ready};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1     <= '0;
      status <= '0;
    end else begin
      s1     <= raw;
      status <= s1;
    end
  end

  assign board_ready_o = &status;
endmodule
