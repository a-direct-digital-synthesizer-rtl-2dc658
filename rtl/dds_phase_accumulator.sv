// dds_phase_accumulator: pipelined phase accumulator of the synthesizer.
//
// Every clock the accumulator adds the frequency word (plus a carry input) to
// its content modulo 2**ACC_W; the rate at which it overflows is the output
// frequency, f_out = f_clk * (fr + cin_avg) / 2**ACC_W. To reach a high clock
// rate the ACC_W-bit adder is cut into NSLICE slices of SLICE_W bits, with a
// register on every carry between slices (ACC_W = 32 and SLICE_W = 4 are the
// published numbers). Slice i therefore works i cycles after slice 0, so the
// frequency word is skewed by i cycles on its way into slice i, and the sum of
// slice i is de-skewed by NSLICE-1-i cycles on its way out. Only the top OUT_W
// bits are brought out (12 in the synthesizer), so only the slices that hold
// them carry de-skew registers.
//
// Carry toggle: when cin_toggle_en is high the carry input of the lowest slice
// alternates 0,1,0,1,... from one clock to the next, so that two steps add the
// odd number 2*fr+1 and the phase sequence visits every value whatever fr is.
// When cin_toggle_en is low the carry input is 0. The toggle itself is
// published; its start value (0 after reset and whenever it is disabled) is
// this design's choice.
//
// Interface and timing (this design's choices): fr and cin_toggle_en are
// sampled every rising clk edge into an input register; rst_n clears every
// register asynchronously. With A(m) = sum over edges k <= m of (fr + cin)
// sampled at edge k, phase_o after edge m is the top OUT_W bits of
// A(m - LATENCY), LATENCY = NSLICE + 1 (9 cycles for 32/4): the input
// register samples the word at edge m-9, the slices add it at edges m-8 to
// m-1 and the output register takes the aligned result at edge m. The carry
// out of the top slice is the wrap-around and is dropped on purpose, and the
// de-skewed word keeps no bits below the OUT_W output bits. cin(k) is 0 when cin_toggle_en is low
// at edge k, otherwise the inverse of cin(k-1).
module dds_phase_accumulator #(
  parameter int unsigned ACC_W   = dds_pkg::ACC_W,
  parameter int unsigned SLICE_W = dds_pkg::SLICE_W,
  parameter int unsigned OUT_W   = dds_pkg::PHASE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] fr,            // frequency word
  input  logic             cin_toggle_en, // 1: toggle the carry input each clock
  output logic [OUT_W-1:0] phase_o        // top OUT_W bits of the accumulator
);

  localparam int unsigned NSLICE  = ACC_W / SLICE_W;
  // First slice that holds one of the OUT_W output bits
  localparam int unsigned FIRST_OUT = (ACC_W - OUT_W) / SLICE_W;

  initial begin
    assert (ACC_W % SLICE_W == 0) else $error("ACC_W must be a multiple of SLICE_W");
    assert (OUT_W <= ACC_W && OUT_W > 0) else $error("OUT_W out of range");
  end

  // Input register
  logic [ACC_W-1:0] fr_q;
  logic             cin_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fr_q     <= '0;
      cin_q    <= 1'b0;
    end else begin
      fr_q     <= fr;
      // carry input of slice 0 for the next addition
      cin_q    <= cin_toggle_en ? ~cin_q : 1'b0;
    end
  end

  // Slice adders; skew[i][k] is the word slice for slice i after k delays.
  logic [NSLICE-1:0][SLICE_W-1:0] acc_q;
  logic [NSLICE-1:0]              carry_q;
  logic [NSLICE-1:0][SLICE_W-1:0] fr_slice;   // skewed word slice at slice i

  for (genvar i = 0; i < NSLICE; i++) begin : g_slice
    // i-stage delay line for word slice i (none for slice 0)
    if (i == 0) begin : g_noskew
      assign fr_slice[i] = fr_q[SLICE_W-1:0];
    end else begin : g_skew
      logic [i-1:0][SLICE_W-1:0] skew_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) skew_q <= '0;
        else begin
          skew_q[0] <= fr_q[i*SLICE_W +: SLICE_W];
          for (int k = 1; k < i; k++) skew_q[k] <= skew_q[k-1];
        end
      end
      assign fr_slice[i] = skew_q[i-1];
    end

    logic cin;
    if (i == 0) begin : g_cin0
      assign cin = cin_q;
    end else begin : g_cini
      assign cin = carry_q[i-1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc_q[i]   <= '0;
        carry_q[i] <= 1'b0;
      end else begin
        {carry_q[i], acc_q[i]} <= {1'b0, acc_q[i]} + {1'b0, fr_slice[i]} + (SLICE_W+1)'(cin);
      end
    end
  end

  // De-skew: slice i waits NSLICE-1-i cycles, then one aligned output register.
  logic [ACC_W-1:0] aligned;
  for (genvar i = 0; i < NSLICE; i++) begin : g_deskew
    localparam int unsigned D = NSLICE - 1 - i;
    if (i < FIRST_OUT) begin : g_unused
      assign aligned[i*SLICE_W +: SLICE_W] = '0;   // below the output bits: no de-skew kept
    end else if (D == 0) begin : g_nodelay
      assign aligned[i*SLICE_W +: SLICE_W] = acc_q[i];
    end else begin : g_delay
      logic [D-1:0][SLICE_W-1:0] dly_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) dly_q <= '0;
        else begin
          dly_q[0] <= acc_q[i];
          for (int k = 1; k < D; k++) dly_q[k] <= dly_q[k-1];
        end
      end
      assign aligned[i*SLICE_W +: SLICE_W] = dly_q[D-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_o <= '0;
    else        phase_o <= aligned[ACC_W-1 -: OUT_W];
  end

endmodule
