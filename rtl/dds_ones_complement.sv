// dds_ones_complement: registered conditional one's complement.
//
// Used twice in the phase-to-amplitude converter to exploit the symmetry of
// the sine wave: the second phase MSB inverts the quadrant phase (so the
// falling quarters read the ROM backwards) and the phase MSB inverts the
// magnitude (so the negative half-wave is the mirror of the positive one).
// Inverting every bit maps x to 2**W-1-x, which is exact mirror symmetry when
// the table is sampled half an LSB off the quadrant edges.
//
// Timing: d and inv are sampled at a rising clk edge; q = inv ? ~d : d is
// valid after that edge (one cycle of latency). The register after the
// inverter is this design's choice for pipelining; rst_n clears q
// asynchronously.
module dds_ones_complement #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         inv,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d ^ {W{inv}};
  end

endmodule
