// tb_dds_top: end-to-end test of the synthesizer at its full size (32-bit
// accumulator, 12-bit phase, 10-bit converter), all parameters at default.
//
// A reference model runs beside the chip: a 32-bit accumulator A(m) updated at
// every rising edge with the frequency word and the toggling carry, and the
// sine look-up rebuilt from its table formulas (dds_ref_pkg). After edge m
// code_o must equal sample(A(m-15)) and the converter currents must follow the
// sample of A(m-16): iout = code, iout_n = 1023 - code. The run goes through:
//  1. a frequency switch from fr = 0: the first step of the converter current
//     must come exactly 16 clocks after the edge that sampled the new word;
//  2. the 1.29 kHz tone of a 10 MHz clock (fr = 554051): one whole output
//     period (7752 clocks) from reset, with exactly one wrap of the phase;
//  3. the 45.8 MHz tone of a 150 MHz clock (fr = 1311396681) for 3000 clocks,
//     counting output periods against the reference;
//  4. random frequency words and carry-toggle settings;
//  5. the carry toggle alone stepping the 12-bit phase: the accumulator is
//     left at 0xFFFFF with fr = 0, so only a toggled carry reaches phase 1.
// It counts how often each mechanism occurred (frequency switch, carry toggle,
// accumulator overflow, carry into the 12 output bits, each quadrant of the
// folding logic, reset) and counts a failure for any that never did. Samples
// are not compared for 16 clocks after a reset, while the pipeline refills.
module tb_dds_top;
  import dds_ref_pkg::*;
  localparam int LAT_CODE = 15;
  localparam int LAT_DAC  = 16;
  localparam int HIST     = 32768;

  logic clk = 0, rst_n = 0;
  logic [31:0] fr = 0;
  logic        tog = 0;
  logic [9:0]  code, iout, iout_n;
  logic signed [10:0] vdiff;
  int checks = 0, failures = 0;
  int n_switch = 0, n_tog = 0, n_tog_step = 0, n_wrap = 0, n_carry20 = 0, n_reset = 0;
  int quad_cnt [4];

  dds_top dut (.clk, .rst_n, .fr, .cin_toggle_en(tog), .code_o(code),
               .iout, .iout_n, .vout_diff(vdiff));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference accumulator, one entry per rising edge
  logic [31:0] hist [HIST];
  logic [31:0] acc_ref = 0;
  logic        cin_ref = 0;
  int          m = -1;
  int          valid_from = 1 << 30;
  always @(posedge clk) begin
    logic [32:0] s;
    m++;
    if (!rst_n) begin
      acc_ref = 0; cin_ref = 0;
    end else begin
      cin_ref = tog ? ~cin_ref : 1'b0;
      s = {1'b0, acc_ref} + {1'b0, fr} + 33'(cin_ref);
      if (s[32]) n_wrap++;
      if (tog) n_tog++;
      if (({1'b0, acc_ref[19:0]} + {1'b0, fr[19:0]} + 21'(cin_ref)) > 21'hF_FFFF)
        n_carry20++;
      acc_ref = s[31:0];
    end
    hist[m % HIST] = acc_ref;
  end

  function automatic int exp_code(int lat);
    logic [31:0] a;
    a = hist[(m - lat) % HIST];
    return sample(int'(a[31:20]));
  endfunction

  // Compare every cycle (at the falling edge, outputs stable)
  always @(negedge clk) begin
    if (rst_n && m >= valid_from) begin
      int ec, ed;
      logic [31:0] a;
      ec = exp_code(LAT_CODE);
      ed = exp_code(LAT_DAC);
      a  = hist[(m - LAT_CODE) % HIST];
      quad_cnt[a[31:30]]++;
      checks += 3;
      if (int'(code) != ec) begin
        failures++;
        if (failures < 10) $display("m=%0d code_o %0d exp %0d", m, code, ec);
      end
      if (int'(iout) != ed || int'(iout_n) != 1023 - ed) begin
        failures++;
        if (failures < 10) $display("m=%0d iout %0d/%0d exp %0d", m, iout, iout_n, ed);
      end
      if (int'(vdiff) != 1023 - 2*ed) begin
        failures++;
        if (failures < 10) $display("m=%0d vout_diff %0d exp %0d", m, vdiff, 1023 - 2*ed);
      end
    end
  end

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    valid_from = m + LAT_DAC + 1;
    n_reset++;
  endtask

  // Counts falling edges of the sample MSB (one per output period) over n clocks
  task automatic run_count(int n, output int falls);
    logic prev;
    falls = 0;
    prev = code[9];
    repeat (n) begin
      @(negedge clk);
      if (prev && !code[9]) falls++;
      prev = code[9];
    end
  endtask

  initial begin
    int falls, edge_n, steps;
    logic [9:0] i0;
    init_tables();

    // 1. Switching time from a constant output
    fr = 0; tog = 0;
    do_reset();
    repeat (40) @(negedge clk);
    i0 = iout;
    fr = 32'h1000_0000;             // sampled at the next rising edge
    n_switch++;
    @(posedge clk); #1; edge_n = m;
    steps = 0;
    while (iout == i0 && steps < 100) begin @(posedge clk); #1; steps++; end
    checks++;
    if (m - edge_n != LAT_DAC) begin
      failures++;
      $display("switching time %0d clocks, expected %0d", m - edge_n, LAT_DAC);
    end else
      $display("frequency switch reaches the converter output after %0d clocks", m - edge_n);
    repeat (100) @(negedge clk);

    // 2. 1.29 kHz at a 10 MHz clock: one full period from reset
    fr = 32'd554051; n_switch++;
    do_reset();
    run_count(7752 + LAT_DAC + 4, falls);
    checks++;
    if (falls != 1) begin
      failures++; $display("1.29 kHz tone: %0d periods in 7752 clocks, expected 1", falls);
    end

    // 3. 45.8 MHz at a 150 MHz clock
    fr = 32'd1311396681; n_switch++;
    do_reset();
    begin
      int wraps0;
      wraps0 = n_wrap;
      run_count(3000, falls);
      // output periods lag the accumulator wraps by the pipeline latency
      checks++;
      if (falls < n_wrap - wraps0 - 5 || falls > n_wrap - wraps0) begin
        failures++;
        $display("45.8 MHz tone: %0d output periods for %0d wraps", falls, n_wrap - wraps0);
      end
      $display("45.8 MHz tone: %0d output periods in 3000 clocks (%.2f MHz at 150 MHz)",
               falls, real'(falls) / 3000.0 * 150.0);
    end

    // 4. Random words and carry toggle
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 39) == 0) begin
        case ($urandom_range(0, 2))
          0: fr = $urandom;
          1: fr = 32'($urandom_range(0, 255));      // very low tones
          default: fr = 32'h8000_0000 - 32'($urandom_range(0, 3)); // near Nyquist
        endcase
        n_switch++;
      end
      if ($urandom_range(0, 99) == 0) tog = ~tog;
    end
    tog = 1; fr = 32'd4096;
    repeat (50) @(negedge clk);

    // 5. Carry toggle made visible: park the accumulator one count below a
    //    phase-LSB boundary, then let only the toggling carry move it.
    tog = 0; fr = 32'h000F_FFFF;
    do_reset();
    @(negedge clk);                  // one edge has added 0xFFFFF
    fr = 0; tog = 1;
    repeat (LAT_DAC + 10) @(negedge clk);
    checks++;
    if (int'(code) != sample(1)) begin
      failures++;
      $display("carry toggle: code %0d, expected the sample of phase 1 (%0d)", code, sample(1));
    end else n_tog_step++;

    checks += 7;
    if (n_tog_step == 0) begin failures++; $display("carry toggle never moved the phase"); end
    if (n_switch == 0)  begin failures++; $display("no frequency switch"); end
    if (n_tog == 0)     begin failures++; $display("carry toggle never on"); end
    if (n_wrap == 0)    begin failures++; $display("no accumulator overflow"); end
    if (n_carry20 == 0) begin failures++; $display("no carry into the output bits"); end
    if (n_reset < 2)    begin failures++; $display("no restart from reset"); end
    if (quad_cnt[0] == 0 || quad_cnt[1] == 0 || quad_cnt[2] == 0 || quad_cnt[3] == 0) begin
      failures++; $display("a quadrant was never used");
    end
    $display("switches=%0d toggle_cycles=%0d overflows=%0d carries_into_phase=%0d resets=%0d",
             n_switch, n_tog, n_wrap, n_carry20, n_reset);
    $display("quadrants %0d %0d %0d %0d", quad_cnt[0], quad_cnt[1], quad_cnt[2], quad_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
