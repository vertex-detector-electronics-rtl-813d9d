// l1_pkg: types and constants shared by the VELO L1 readout board.
//
// Holds the sizes of the board (16 front-end chips of 128 channels, four
// 32-channel analog links per chip), the L1 buffer event layout (38 words
// written into a 64-word slot addressed by an 11-bit event pointer), the
// event identifier record passed from the fast-control FPGA to the
// preprocessor FPGAs, and the bit positions of the TTC broadcast commands.
// All numbers here follow the board description except where marked
// "assumed".  Not every module uses every constant, so a lint run per
// module reports the ones that module leaves unused; that is expected.
package l1_pkg;

  localparam int unsigned N_CHIPS      = 16;   // SPP_FPGA / DSP pairs per board
  localparam int unsigned LINKS        = 4;    // analog links per front-end chip
  localparam int unsigned CH_PER_LINK  = 32;
  localparam int unsigned CH_PER_CHIP  = LINKS * CH_PER_LINK;  // 128
  localparam int unsigned HDR_NIBBLES  = 2;    // PCN header words per link
  localparam int unsigned FRAME_WORDS  = HDR_NIBBLES + CH_PER_LINK;  // 34

  // L1 buffer event layout
  localparam int unsigned EV_WORDS     = 38;   // 2 header + 32 data + 4 hit words
  localparam int unsigned SLOT_WORDS   = 64;
  localparam int unsigned SLOT_W       = 6;    // log2(SLOT_WORDS)
  localparam int unsigned PTR_W        = 11;   // event pointer, 2K events
  localparam int unsigned BUF_ADDR_W   = PTR_W + SLOT_W;  // 128K words

  localparam int unsigned MAX_SPP_CL   = 64;   // clusters one SPP can find

  // Event identifiers attached to every event fragment.
  typedef struct packed {
    logic [11:0] l0id;
    logic [11:0] bcid;
    logic [7:0]  pcn;
  } ev_tag_t;

  // One L1 trigger cluster as found in one chip: size bit + channel address.
  typedef struct packed {
    logic       s;      // 1 = two-channel cluster
    logic [6:0] addr;   // first channel, 0..127
  } cluster_t;

  // TTC broadcast command bits, CMD<7..0>.  Bits 1..0 are delivered by the
  // TTC receiver on its own pins, so only CMD<7..2> reach the board logic.
  localparam int unsigned CMD_L1_DECISION = 7;  // 1 = L1 trigger decision
  localparam int unsigned CMD_L0_RESET    = 2;  // with CMD<7..6> = 01
  localparam int unsigned CMD_L1_RESET    = 3;
  localparam int unsigned CMD_L1ID_RESET  = 4;

  // Board configuration written by the ECS (one flat record here; on the
  // board these are registers in the individual FPGAs and DSPs).
  typedef struct packed {
    logic [7:0]  hit_threshold;   // SPP hit detection
    logic [6:0]  spp_cl_limit;    // 7-bit cluster limit, SPP and DSP
    logic        spp_timeout_en;
    logic [7:0]  l1t_cl_limit;    // 8-bit cluster limit, L1T and DAQ FPGA
    logic [15:0] l1t_link_id;
    logic [15:0] daq_link_id;
    logic [7:0]  board_no;
    logic        z_mode;          // DSP no-processing mode
    logic [7:0]  np_count;        // non-processed channels per DSP
    logic [3:0]  derand_thr;      // DSP throttle level
    logic [7:0]  zs_threshold;    // DSP zero suppression
    logic [15:0] throttle_mask;   // 1 = DSP throttle enabled
  } board_cfg_t;

  // Pedestal table write (both the SPP and the DSP table of one chip).
  typedef struct packed {
    logic       we;
    logic [3:0] chip;
    logic [6:0] addr;
    logic [7:0] data;
  } ped_wr_t;

  // One-clock ECS commands.
  typedef struct packed {
    logic l0id_clear;
    logic l1id_clear;
    logic throttle_cnt_clear;
    logic l1t_link_reset;
    logic daq_link_reset;
  } ecs_cmd_t;

  // S-LINK source card interface, board side.
  typedef struct packed {
    logic [31:0] ud;
    logic        uwen_n;
    logic        ureset_n;
  } slink_out_t;

  typedef struct packed {
    logic lff_n;
    logic ldown_n;
  } slink_in_t;

endpackage
