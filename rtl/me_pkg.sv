// me_pkg: constants and types shared by the motion-estimation datapath.
//
// The numbers follow the design: 4x4 basis blocks, a full search range of
// [-8,+7] in both directions, a 16x1 PE array per reconfigurable region, up to
// four regions, 12-bit SADs and 8-bit motion vectors, QCIF frames (176x144)
// and 16x16 macroblocks. The packing of a motion vector into 8 bits (4-bit
// two's-complement horizontal offset above a 4-bit vertical offset) is this
// design's own choice.
package me_pkg;

  localparam int unsigned BLK       = 4;    // basis block edge (4x4)
  localparam int unsigned MB        = 16;   // macroblock edge
  localparam int unsigned NBLK      = 16;   // 4x4 blocks per macroblock
  localparam int          SR_MIN    = -8;   // search range [-8,+7]
  localparam int unsigned NPE       = 16;   // PEs per array (16x1)
  localparam int unsigned NGRP      = 4;    // 4x1 PE groups per array
  localparam int unsigned NBAND     = 5;    // search-window bands read per array
  localparam int unsigned NCOL      = NBAND * BLK; // latched column pixels (19 used)
  localparam int unsigned MAX_PRR   = 4;    // reconfigurable regions
  localparam int unsigned NBAND_ALL = NBAND + MAX_PRR - 1; // bands the controller reads
  localparam int unsigned SAD_W     = 12;   // 16*255 = 4080 fits
  localparam int unsigned MV_W      = 8;
  localparam int unsigned FRAME_W   = 176;  // QCIF
  localparam int unsigned FRAME_H   = 144;

  typedef logic [7:0]       pixel_t;
  typedef logic [SAD_W-1:0] sad_t;
  typedef logic [3:0]       off_t;   // two's-complement offset in [-8,+7]

  typedef struct packed {
    off_t h;   // horizontal displacement
    off_t v;   // vertical displacement
  } mv_t;

  // Number of active PE arrays: 1, 2 or 4 (encoded as log2).
  typedef enum logic [1:0] {
    PRR_1 = 2'd0,
    PRR_2 = 2'd1,
    PRR_4 = 2'd2
  } prr_mode_e;

  // Result of one 4x4 block.
  typedef struct packed {
    sad_t sad;
    mv_t  mv;
  } blk_result_t;

endpackage
