// tb_dds_phase_to_amplitude: self-checking test of the compressed sine look-up.
//
// Feeds a new 12-bit phase every clock: all 4096 phases in order, then random
// phases. Each sample must appear exactly 5 edges after the edge that sampled
// its phase, and must equal (a) the reference built from the table formulas in
// dds_ref_pkg, bit for bit, and (b) the ideal offset-binary value
// 511.5 - 511.5*sin(2*pi*(phase+0.5)/4096) within 1.15 LSB. It also counts
// samples from each quadrant, so both one's complementers are exercised, and
// checks that the mirrored quadrants give mirrored samples.
module tb_dds_phase_to_amplitude;
  import dds_ref_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  logic [11:0] phase;
  logic [9:0]  amp;
  int checks = 0, failures = 0;
  int quad_cnt [4];
  real maxerr = 0.0;

  dds_phase_to_amplitude dut (.clk, .rst_n, .phase_i(phase), .amp_o(amp));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ph_hist [0:16383];
  int amp_by_phase [4096];
  int e = -1;       // rising edges after reset release

  initial begin
    int n;
    n = 4096 + 3000;
    init_tables();
    phase = '0;
    repeat (2) @(negedge clk);
    checks++; if (amp !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < n + LAT + 1; i++) begin
      @(negedge clk);
      // amp now shows the sample for the phase sampled at edge e-LAT
      if (e - LAT >= 0) begin
        int ph;
        real err;
        ph = ph_hist[e - LAT];
        checks += 2;
        if (int'(amp) != sample(ph)) begin
          failures++;
          if (failures < 10) $display("phase %0d: got %0d exp %0d", ph, amp, sample(ph));
        end
        err = real'(amp) - ideal(ph);
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        if (err > 1.15) begin
          failures++;
          if (failures < 10) $display("phase %0d: %0d is %f from the ideal sine", ph, amp, err);
        end
        quad_cnt[ph >> 10]++;
        amp_by_phase[ph] = int'(amp);
      end
      phase = (i < 4096) ? 12'(i) : 12'($urandom);
      @(posedge clk);
      e++;
      ph_hist[e] = int'(phase);
    end
    // Symmetry: second quadrant mirrors the first, second half-wave negates
    for (int p = 0; p < 1024; p++) begin
      checks += 2;
      if (amp_by_phase[p] != amp_by_phase[2047 - p]) failures++;
      if (amp_by_phase[p] + amp_by_phase[2048 + p] != 1023) failures++;
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_cnt[q] == 0) begin failures++; $display("quadrant %0d never seen", q); end
    end
    $display("quadrant samples %0d %0d %0d %0d, largest error vs ideal %f LSB",
             quad_cnt[0], quad_cnt[1], quad_cnt[2], quad_cnt[3], maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
