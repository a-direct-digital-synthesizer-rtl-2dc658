// dds_delay: DEPTH-stage register delay line of W bits.
//
// Keeps side signals (the phase MSB, the coarse ROM address, the fine ROM
// word) in step with the pipelined datapath, as the DELAY boxes of the
// converter do. q after rising edge n equals d sampled at edge n-DEPTH+1;
// DEPTH = 0 is a plain wire. rst_n clears every stage asynchronously.
module dds_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [DEPTH-1:0][W-1:0] stage_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stage_q <= '0;
      else begin
        stage_q[0] <= d;
        for (int k = 1; k < DEPTH; k++) stage_q[k] <= stage_q[k-1];
      end
    end
    assign q = stage_q[DEPTH-1];
  end

endmodule
