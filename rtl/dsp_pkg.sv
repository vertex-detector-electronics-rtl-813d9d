// dsp_pkg: layout of the event fragment a DSP sends to the DAQ link FPGA
// over its 16-bit link.
//
// Header, five 16-bit words (the field list follows the board description,
// the packing into words is this design's choice):
//   word 0 : L1ID<15..0>
//   word 1 : E<3..0> L0ID<11..0>
//   word 2 : R Z 00 BCID<11..0>
//   word 3 : PCN<7..0> N<7..0>       (N = DAQ clusters)
//   word 4 : T M<6..0> 00000000      (M = L1 trigger clusters)
// Body, in this order:
//   N DAQ clusters: one word 000000 len<2..0> addr<6..0>, then the len
//     signal values, two per word, first in bits 7..0
//   M L1 trigger clusters, one byte {S, addr<6..0>} each, two per word
//   the non-processed samples, two per word
// An odd byte count in any section is padded with a zero byte.
// Modules use only the constants they need, so per-module lint lists the
// others as unused.
package dsp_pkg;
  localparam int unsigned DSP_HDR_WORDS = 5;
  localparam int unsigned DERAND_EVENTS = 16;
  localparam int unsigned MAX_DAQ_CL_LEN = 7;
endpackage
