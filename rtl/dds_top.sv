// dds_top: direct digital synthesizer with its on-chip D/A converter.
//
// A 32-bit frequency word fr is accumulated every clock by a pipelined phase
// accumulator (4-bit slices). The 12 most significant phase bits go to a
// compressed sine look-up (quadrant folding, 128 x 7 coarse sine-difference ROM,
// 128 x 3 fine ROM), which produces a 10-bit offset-binary sample. The sample
// is brought out on code_o for an optional external converter and drives the
// on-chip 10-bit current-steering D/A converter (a behavioural model here).
// An external low-pass filter, not part of this design, would remove the clock
// images from the converter output.
//
// Output frequency: f_out = f_clk * fr / 2**32, or f_clk * (fr + 0.5) / 2**32
// with the carry toggle on (cin_toggle_en = 1), which randomises the look-up
// and converter errors by giving every fr the longest phase period. At
// f_clk = 150 MHz one step of fr is 0.0349 Hz.
//
// Timing (this design's pipeline): with A(m) the sum of fr (+ carry) over the
// rising edges up to m, code_o after edge m is the sample for the top 12 bits
// of A(m - LATENCY), LATENCY = 15 (9 in the accumulator, 1 edge to
// sample its output, 5 in the converter), and the
// converter currents follow one edge later. A new fr therefore first shows in
// the output current 16 clocks after the edge that sampled it. rst_n clears
// every register of the digital part asynchronously.
module dds_top
  import dds_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ACC_W-1:0]   fr,             // frequency word
  input  logic               cin_toggle_en,  // toggle the accumulator carry input
  output logic [AMP_W-1:0]   code_o,         // sample to an off-chip converter
  output logic [AMP_W-1:0]   iout,           // converter current, units of I
  output logic [AMP_W-1:0]   iout_n,         // complementary current
  output logic signed [AMP_W:0] vout_diff    // differential output, units of I*R
);

  logic [PHASE_W-1:0] phase;

  dds_phase_accumulator #(.ACC_W(ACC_W), .SLICE_W(SLICE_W), .OUT_W(PHASE_W)) u_acc (
    .clk, .rst_n, .fr, .cin_toggle_en, .phase_o(phase)
  );

  dds_phase_to_amplitude u_p2a (
    .clk, .rst_n, .phase_i(phase), .amp_o(code_o)
  );

  dds_dac_model #(.N_BITS(AMP_W), .LSB_BITS(5)) u_dac (
    .clk, .clk_n(~clk), .d(code_o), .iout, .iout_n, .vout_diff
  );

endmodule
