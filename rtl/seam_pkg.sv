// Shared types and constants of the seam-carving energy accelerator.
//
// A video frame here is a plane of the video cut at one horizontal position:
// rows run along the vertical axis and each row runs along time. A pixel is a
// 32-bit word holding three 8-bit colour intensities (bytes 0..2, byte 3
// unused); an energy is 16 bits. Block RAM words are 1024 bits wide, so one
// word holds 32 pixels or 64 energies, packed little-endian: element i of a
// word sits at bits [W*i +: W]. These sizes are the ones the design is built
// around; which byte carries which colour does not matter to the energy
// function, because all three channels are weighted equally.
package seam_pkg;

  localparam int unsigned PIX_W         = 32;
  localparam int unsigned CHAN_W        = 8;
  localparam int unsigned EN_W          = 16;
  localparam int unsigned WORD_W        = 1024;
  localparam int unsigned PIX_PER_WORD  = WORD_W / PIX_W;  // 32
  localparam int unsigned EN_PER_WORD   = WORD_W / EN_W;   // 64

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [EN_W-1:0]   energy_t;
  typedef logic [WORD_W-1:0] word_t;

  // One access on a single BRAM port: 1-cycle registered read data.
  typedef enum logic [1:0] {
    ACC_IDLE  = 2'd0,
    ACC_READ  = 2'd1,
    ACC_WRITE = 2'd2
  } access_e;

endpackage
