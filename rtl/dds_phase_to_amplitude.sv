// dds_phase_to_amplitude: compressed sine look-up (phase-to-amplitude converter).
//
// Converts the 12-bit phase into a 10-bit sine sample with two small ROMs
// instead of one 4096 x 10 table:
//  * The phase MSB selects the half-wave and the second MSB the rising or
//    falling quarter. When the second MSB is 1 the 10 remaining bits are
//    one's-complemented, so every quarter reads the same quarter-wave table.
//  * The 10-bit quarter phase p = {A[3:0], B[2:0], C[2:0]} addresses a
//    128 x 7 coarse ROM with {A,B} and a 128 x 3 fine ROM with {A,C}.
//  * Sine-difference: the coarse ROM stores sin minus a straight line, so the
//    9-bit magnitude is  mag = 4*{A,B} + coarse(A,B) + fine(A,C)  (the first
//    adder restores the line, the second adds the fine correction).
//  * The phase MSB finally selects whether the magnitude is one's-complemented,
//    and becomes the top bit of the 10-bit sample.
// The quadrant folding, the two one's complementers, the coarse/fine ROM sizes
// (2**7 x 7 and 2**7 x 3), the sine-difference adder and the three delay
// lines follow the published architecture. This design's own choices are: the
// {A,B}/{A,C} address split with A = 4, B = 3, C = 3 bits; the table contents;
// the register placement; and the output polarity. The complement is taken
// when the phase MSB is 0, so amp_o is offset binary with the MSB passed
// straight through: amp_o = 511 - mag in the first half-wave and 512 + mag in
// the second, i.e. the sample follows -sin(2*pi*phase/4096).
//
// Table contents (this design's choice): with the quarter-wave target
//   S(p) = 511.5*sin(pi/2*(p+0.5)/1024) - 0.5,  M(p) = round(S(p)),  p = 0..1023,
// fine(A,C)   = round(mean over B of S(A,B,C) - S(A,B,0))   (0..7),
// coarse(A,B) = round(mean over C of M(A,B,C) - fine(A,C)) - 4*{A,B}
// (round = add 0.5 and take the floor). The rebuilt magnitude is within 1.1
// LSB of S(p); the largest spur of the resulting full sine wave is 74.4 dB
// below the carrier. Both tables are stored in rtl/dds_coarse_rom.hex and
// rtl/dds_fine_rom.hex, one hex word per line, address 0 first.
//
// Timing: phase_i is sampled every rising clk edge; the sample for the phase
// sampled at edge n is on amp_o after edge n+5 (P2A_LAT). Fully pipelined, one
// sample per clock. rst_n clears all registers asynchronously.
module dds_phase_to_amplitude
  import dds_pkg::*;
#(
  parameter string COARSE_FILE = COARSE_ROM_FILE,
  parameter string FINE_FILE   = FINE_ROM_FILE
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase_i,
  output logic [AMP_W-1:0]   amp_o
);

  // Stage 1: quadrant folding
  logic [QPHASE_W-1:0] qphase;
  dds_ones_complement #(.W(QPHASE_W)) u_fold (
    .clk, .rst_n,
    .d   (phase_i[QPHASE_W-1:0]),
    .inv (phase_i[PHASE_W-2]),
    .q   (qphase)
  );

  // Phase MSB, kept in step with the datapath up to the sign stage
  logic msb_d;
  dds_delay #(.W(1), .DEPTH(P2A_LAT)) u_msb_dly (
    .clk, .rst_n, .d(phase_i[PHASE_W-1]), .q(msb_d)
  );

  // Stages 2-3: ROMs
  localparam int unsigned A_W = 4, B_W = 3, C_W = 3;
  logic [ROM_AW-1:0] coarse_addr, fine_addr;
  assign coarse_addr = qphase[QPHASE_W-1 -: A_W + B_W];
  assign fine_addr   = {qphase[QPHASE_W-1 -: A_W], qphase[C_W-1:0]};

  logic [COARSE_W-1:0] coarse;
  logic [FINE_W-1:0]   fine;

  dds_rom #(.DEPTH(2**ROM_AW), .WIDTH(COARSE_W), .COLS(4), .INIT_FILE(COARSE_FILE)) u_coarse_rom (
    .clk, .rst_n, .addr(coarse_addr), .dout(coarse)
  );
  dds_rom #(.DEPTH(2**ROM_AW), .WIDTH(FINE_W), .COLS(8), .INIT_FILE(FINE_FILE)) u_fine_rom (
    .clk, .rst_n, .addr(fine_addr), .dout(fine)
  );

  // Coarse address delayed to meet the coarse ROM word (the straight line)
  logic [ROM_AW-1:0] line_d;
  dds_delay #(.W(ROM_AW), .DEPTH(ROM_LAT + 1)) u_line_dly (
    .clk, .rst_n, .d(coarse_addr), .q(line_d)
  );

  // Stage 4: first adder restores sin from the sine-difference word;
  // the fine word waits one cycle.
  logic [MAG_W-1:0] sum1_q;
  logic [FINE_W-1:0] fine_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum1_q <= '0;
    else        sum1_q <= {line_d, 2'b00} + MAG_W'(coarse);
  end
  dds_delay #(.W(FINE_W), .DEPTH(1)) u_fine_dly (
    .clk, .rst_n, .d(fine), .q(fine_d)
  );

  // Stage 5: second adder adds the fine correction
  logic [MAG_W-1:0] mag_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mag_q <= '0;
    else        mag_q <= sum1_q + MAG_W'(fine_d);
  end

  // Stage 6: half-wave sign by one's complement; MSB passes straight on
  logic [MAG_W-1:0] mag_signed;
  dds_ones_complement #(.W(MAG_W)) u_sign (
    .clk, .rst_n, .d(mag_q), .inv(~msb_d), .q(mag_signed)
  );
  logic msb_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) msb_q <= 1'b0;
    else        msb_q <= msb_d;
  end

  assign amp_o = {msb_q, mag_signed};

endmodule
