// fct_pkg: constants shared by the JPEG-XR Forward Core Transform (FCT) datapath.
//
// PIX_W is the pixel width at the input of the first stage (16 bits, as in the
// reference implementation this design follows). Every lifting transform block
// (T2x2h, Todd, Toddodd) widens its W-bit input by GROW = 2 bits at its output,
// which holds the largest magnitude any of the three can produce (2^W, reached by
// T2x2h). Stage 1 therefore emits PIX_W+2 bit coefficients and stage 2 emits
// PIX_W+4 bit coefficients.
//
// S1_QUAD and S2_QUAD list, for each of the four 2x2 sub-transforms of a stage,
// which positions of the 4x4 block (raster order, 0..15) feed its inputs
// iCoeff[0..3]. Within each 2x2 group the positions are taken in raster order of
// the group as it is drawn in the stage diagrams.
package fct_pkg;

  localparam int unsigned PIX_W = 16;
  localparam int unsigned GROW  = 2;
  localparam int unsigned NCOEF = 16;   // values in one 4x4 block
  localparam int unsigned NBLK  = 16;   // 4x4 blocks in one macroblock
  localparam int unsigned LAT   = 4;    // clock steps of every sub-transform

  // Stage 1: four T2x2h on the pixels of one block.
  localparam int unsigned S1_QUAD [4][4] = '{
    '{ 0,  3, 12, 15},
    '{ 1,  2, 13, 14},
    '{ 4,  7,  8, 11},
    '{ 5,  6,  9, 10}
  };

  // Stage 2: T2x2h, Todd, Todd, Toddodd on the DC/LP block of a macroblock.
  localparam int unsigned S2_QUAD [4][4] = '{
    '{ 0,  1,  4,  5},    // T2x2h, valRound = 1
    '{ 2,  3,  6,  7},    // Todd
    '{ 8, 12,  9, 13},    // Todd
    '{10, 11, 14, 15}     // Toddodd
  };

endpackage
