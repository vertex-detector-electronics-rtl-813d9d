// throttle_ctrl: board throttle logic of the fast and slow control FPGA.
//
// Each DSP raises a throttle when its L1 derandomizer is nearly full.  The
// ECS can disable each throttle input individually with the enable mask.
// Every rising edge of an input throttle is counted in its own counter
// (counting also while it is disabled, so that the ECS sees what the DSP
// did); the counters are cleared by L1_Reset or an ECS clear.  The global
// throttle is the OR of all enabled throttles; it drives the front-panel
// NIM output and a status-register bit.
//
// Timing: inputs are registered once, so throttle_out follows an input by
// one clock.  Counting edges rather than busy clocks, the counter width
// and the clear inputs are this design's choices.
module throttle_ctrl #(
  parameter int unsigned N     = 16,
  parameter int unsigned CNT_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr,          // L1_Reset or ECS clear
  input  logic [N-1:0]              throttle_in,
  input  logic [N-1:0]              mask_en,      // 1 = throttle enabled
  output logic                      throttle_out, // global OR
  output logic [N-1:0][CNT_W-1:0]   counts
);
  logic [N-1:0] thr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr_q        <= '0;
      throttle_out <= 1'b0;
      counts       <= '0;
    end else begin
      thr_q        <= throttle_in;
      throttle_out <= |(throttle_in & mask_en);
      for (int i = 0; i < N; i++) begin
        if (clr)
          counts[i] <= '0;
        else if (throttle_in[i] && !thr_q[i] && counts[i] != '1)
          counts[i] <= counts[i] + 1'b1;
      end
    end
  end
endmodule
