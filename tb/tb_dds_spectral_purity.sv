// tb_dds_spectral_purity: spectral purity of the complete synthesizer at its
// full size, from coherent DFTs of the 10-bit output samples (code_o).
//
// Run 1, table purity: with fr = 2**20 the 12-bit phase advances by exactly
// one step per clock, so 4096 samples form one period that visits every phase
// once, with no phase-truncation error. The worst spur (any bin but DC and the
// carrier) must be at most -74.0 dBc, the target for the compressed tables.
//
// Run 2, phase truncation: with fr = 1.5 * 2**20 only 12 of the 32 phase bits
// reach the look-up, and the dropped half step gives the worst-case
// truncation spur, -6.02*12 + 3.92 = -68.3 dBc in theory. 8192 samples hold
// three periods exactly. The worst spur must lie within 1 dB of that value.
//
// Each run also checks the carrier bin and that DC is negligible.
module tb_dds_spectral_purity;
  localparam int NMAX = 8192;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic [31:0] fr = 0;
  logic [9:0] code, iout, iout_n;
  logic signed [10:0] vdiff;
  int checks = 0, failures = 0;

  dds_top dut (.clk, .rst_n, .fr, .cin_toggle_en(1'b0), .code_o(code),
               .iout, .iout_n, .vout_diff(vdiff));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real x [NMAX];
  real cs [NMAX];
  real sn [NMAX];

  // Captures n samples at frequency word f and returns the worst spur (dBc)
  task automatic measure(input logic [31:0] f, input int n, input int carrier_bin,
                         output real spur_dbc, output real dc_dbc);
    real carrier, worst, dc, re, im, p;
    int worst_k, peak_k;
    real peak;
    for (int j = 0; j < n; j++) begin
      cs[j] = $cos(2.0 * PI * real'(j) / real'(n));
      sn[j] = $sin(2.0 * PI * real'(j) / real'(n));
    end
    @(negedge clk);
    rst_n = 0; fr = f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);          // pipeline filled
    for (int i = 0; i < n; i++) begin
      x[i] = real'(code) - 511.5;
      @(negedge clk);
    end
    carrier = 0.0; worst = 0.0; worst_k = -1; dc = 0.0; peak = 0.0; peak_k = -1;
    for (int k = 0; k <= n/2; k++) begin
      re = 0.0; im = 0.0;
      for (int i = 0; i < n; i++) begin
        re += x[i] * cs[(k * i) % n];
        im -= x[i] * sn[(k * i) % n];
      end
      p = re*re + im*im;
      if (p > peak) begin peak = p; peak_k = k; end
      if (k == 0) dc = p;
      else if (k == carrier_bin) carrier = p;
      else if (p > worst) begin worst = p; worst_k = k; end
    end
    spur_dbc = 10.0 * $log10(worst / carrier);
    dc_dbc   = 10.0 * $log10((dc + 1e-30) / carrier);
    checks++;
    if (peak_k != carrier_bin) begin
      failures++;
      $display("fr=%h: largest bin %0d, expected the carrier at bin %0d", f, peak_k, carrier_bin);
    end
    $display("fr=%h, %0d samples: worst spur at bin %0d: %.2f dBc, DC %.2f dBc",
             f, n, worst_k, spur_dbc, dc_dbc);
  endtask

  initial begin
    real s, d;
    measure(32'h0010_0000, 4096, 1, s, d);
    checks += 2;
    if (s > -74.0) begin failures++; $display("table spur above -74 dBc"); end
    if (d > -60.0) begin failures++; $display("DC too large"); end

    measure(32'h0018_0000, 8192, 3, s, d);
    checks += 2;
    if (s > -67.3 || s < -69.3) begin
      failures++; $display("truncation spur %.2f dBc, expected -68.3 +- 1 dB", s);
    end
    if (d > -60.0) begin failures++; $display("DC too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
