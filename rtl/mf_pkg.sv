// mf_pkg: shared constants and types of the portable memory access framework.
//
// The framework hides the local memory banks of a reconfigurable computer
// behind one logical memory view. Its user-side interface carries 128-bit
// data blocks, a 20-bit block address (one 16 MB logical bank of 16-byte
// blocks) and a 32-bit data volume; these widths are the framework's own.
// The 32-bit host block address is a choice of this design.
package mf_pkg;

  // Width of one data block on every port, in bits.
  localparam int unsigned MF_DATA_W  = 128;
  // Width of the user-side logical block address (16 MB / 16 B = 2^20).
  localparam int unsigned MF_ADDR_W  = 20;
  // Width of a data volume, counted in blocks.
  localparam int unsigned MF_VOL_W   = 32;
  // Width of a host-memory block address.
  localparam int unsigned MF_HADDR_W = 32;

  // The three memory access modes. The encoding follows the mode numbers.
  typedef enum logic [1:0] {
    MODE_NONE           = 2'd0,  // reserved, a job in this mode ends at once
    MODE_DUAL_RANDOM    = 2'd1,  // mode-1: one logical bank, read and write
    MODE_SINGLE_RANDOM  = 2'd2,  // mode-2: bank 0 read only, bank 1 write only
    MODE_SEQUENTIAL     = 2'd3   // mode-3: in-order read and write streams
  } mode_e;

  // Direction of one transfer between host memory and a logical bank.
  typedef enum logic {
    XFER_IN  = 1'b0,  // host memory -> logical bank (raw data)
    XFER_OUT = 1'b1   // logical bank -> host memory (result data)
  } xfer_dir_e;

endpackage
