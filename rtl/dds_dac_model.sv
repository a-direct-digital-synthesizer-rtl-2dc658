// dds_dac_model: behavioural model of the 10-bit current-steering D/A converter.
//
// This is a behavioural model of an analog block, not synthesizable logic of
// the chip. It reproduces the converter's signal flow at the level of whole
// unit currents: the 10 input bits (LSB, D1..D8, MSB) pass a CMOS-to-ECL
// converter, are captured by a bank of 10 input latches clocked by the
// differential converter clock clk/clk_n, and each latched bit steers a
// binary-weighted current (I, 2I, ..., 512I) to the true output when it is 1
// and to the complementary output when it is 0. The weights come from two
// current arrays: the 5-LSB array (I..16I) and the 5-MSB array (32I..512I).
// Every bit therefore always draws its current from one of the two outputs, so
// iout + iout_n = 1023 I for any code. The resistive loads and the emitter
// follower turn the two currents into a differential voltage proportional to
// vout_diff = iout_n - iout (in units of I*R).
//
// From the published converter: 10 bits, the input latches on CLK/CLK-bar, the
// binary weights I..512I, the split into a 5-LSB and a 5-MSB array and the
// complementary outputs. This model's own choices: the latch is modelled as a
// register loaded on the rising edge of clk; currents are integers in units of
// I; the sign of vout_diff. Not modelled: the level conversion itself, base
// current compensation, mismatch, glitches, settling and the output filter.
//
// Timing: d is latched at a rising clk edge and the currents follow after that
// edge. clk_n must be the complement of clk (checked by an assertion).
module dds_dac_model #(
  parameter int unsigned N_BITS   = 10,
  parameter int unsigned LSB_BITS = 5    // bits served by the LSB current array
) (
  input  logic                     clk,
  input  logic                     clk_n,
  input  logic [N_BITS-1:0]        d,        // offset-binary code
  output logic [N_BITS-1:0]        iout,     // true output current, units of I
  output logic [N_BITS-1:0]        iout_n,   // complementary output current
  output logic signed [N_BITS:0]   vout_diff // (iout_n - iout), units of I*R
);

  // Input latches (after the CMOS-to-ECL level conversion)
  logic [N_BITS-1:0] latch_q;
  always @(posedge clk) latch_q <= d;

  always @(posedge clk)
    assert (clk_n == 1'b0) else $error("dac: clk_n is not the complement of clk");

  // Current switches: bit k steers 2**k I to one of the two outputs.
  logic [N_BITS-1:0] lsb_arr_p, lsb_arr_n, msb_arr_p, msb_arr_n;
  always_comb begin
    lsb_arr_p = '0; lsb_arr_n = '0; msb_arr_p = '0; msb_arr_n = '0;
    for (int k = 0; k < N_BITS; k++) begin
      if (k < LSB_BITS) begin
        if (latch_q[k]) lsb_arr_p += N_BITS'(1) << k;
        else            lsb_arr_n += N_BITS'(1) << k;
      end else begin
        if (latch_q[k]) msb_arr_p += N_BITS'(1) << k;
        else            msb_arr_n += N_BITS'(1) << k;
      end
    end
    iout      = lsb_arr_p + msb_arr_p;
    iout_n    = lsb_arr_n + msb_arr_n;
    vout_diff = $signed({1'b0, iout_n}) - $signed({1'b0, iout});
  end

endmodule
