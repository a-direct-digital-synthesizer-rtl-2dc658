// dds_pkg: word widths shared by the blocks of the direct digital synthesizer.
//
// The synthesizer accumulates a 32-bit frequency word, keeps the 12 most
// significant phase bits, folds them into one quadrant (10 bits), looks up a
// 9-bit quarter-wave magnitude in a compressed coarse/fine ROM pair and hands a
// 10-bit sample to a current-steering D/A converter. The 32/12/10/9/7/3 widths
// are the design's published numbers; the split of the 10 quadrant bits into
// the coarse and fine ROM addresses is this design's own choice (see
// dds_phase_to_amplitude).
package dds_pkg;

  // Phase accumulator
  localparam int unsigned ACC_W     = 32;  // frequency word and accumulator width
  localparam int unsigned SLICE_W   = 4;   // width of one pipelined adder slice
  localparam int unsigned PHASE_W   = 12;  // phase bits passed to the sine look-up

  // Phase-to-amplitude converter
  localparam int unsigned QPHASE_W  = PHASE_W - 2; // phase inside one quadrant
  localparam int unsigned ROM_AW    = 7;   // address width of each ROM
  localparam int unsigned COARSE_W  = 7;   // coarse (sine-difference) ROM word
  localparam int unsigned FINE_W    = 3;   // fine (interpolation) ROM word
  localparam int unsigned MAG_W     = 9;   // quarter-wave magnitude
  localparam int unsigned AMP_W     = 10;  // sample width at the D/A converter

  // Pipeline latencies: an input sampled at rising edge n shows at the output
  // after edge n+LAT.
  localparam int unsigned ROM_LAT   = 1;   // decoder register, output register
  localparam int unsigned P2A_LAT   = ROM_LAT + 4; // fold, ROM, 2 adders, sign

  // ROM tables
  localparam string COARSE_ROM_FILE = "rtl/dds_coarse_rom.hex";
  localparam string FINE_ROM_FILE   = "rtl/dds_fine_rom.hex";

endpackage
