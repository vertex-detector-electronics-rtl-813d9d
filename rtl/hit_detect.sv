// hit_detect: pedestal subtraction and hit detection for one front-end
// chip.
//
// The four analog links of a chip deliver one sample each per clock; the
// caller gives the channel number (0..127) of each sample.  A per-channel
// pedestal table, loaded by the ECS, is subtracted and the result compared
// with a common threshold: the channel is a hit when
// sample - pedestal > threshold.  The comparison is done without
// wrapping, so a sample below its pedestal is never a hit.
//
// Timing: combinational from sample to hit; the pedestal table is written
// synchronously.  The common threshold and the 8-bit pedestals are this
// design's choices; the description names only "pedestal subtraction" and
// "amplitude above a threshold value".
module hit_detect #(
  parameter int unsigned LANES    = 4,
  parameter int unsigned CHANNELS = 128
) (
  input  logic                                 clk,
  input  logic                                 ped_we,
  input  logic [$clog2(CHANNELS)-1:0]          ped_addr,
  input  logic [7:0]                           ped_wdata,
  input  logic [7:0]                           threshold,
  input  logic [LANES-1:0][7:0]                sample,
  input  logic [LANES-1:0][$clog2(CHANNELS)-1:0] channel,
  output logic [LANES-1:0]                     hit
);
  logic [7:0] ped [CHANNELS];

  always_ff @(posedge clk) begin
    if (ped_we) ped[ped_addr] <= ped_wdata;
  end

  always_comb begin
    for (int i = 0; i < LANES; i++)
      hit[i] = {2'b00, sample[i]} > ({2'b00, ped[channel[i]]} + {2'b00, threshold});
  end
endmodule
