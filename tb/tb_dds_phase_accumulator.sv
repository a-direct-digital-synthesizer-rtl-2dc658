// tb_dds_phase_accumulator: self-checking test of the pipelined phase accumulator.
//
// u_full is the 32-bit accumulator with 4-bit slices and all 32 bits brought
// out, so every bit and every inter-slice carry is checked; u_dflt is the
// default 12-bit-output instance. A reference accumulator A(m) = A(m-1) +
// fr + cin, updated at every rising edge, is compared with phase_o, which
// must show A(m - 9) after edge m (input register + 8 slices). The frequency
// word and the carry-toggle enable change at random moments, so frequency
// switches are checked as well. u_small (8 bits, 4-bit slices) checks the
// period property of the carry toggle: with fr = 0x40 the phase takes only 4
// values without the toggle and all 256 values with it.
module tb_dds_phase_accumulator;
  localparam int LAT = 9;
  logic clk = 0, rst_n = 0;
  logic [31:0] fr;
  logic        tog;
  logic [31:0] ph_full;
  logic [11:0] ph_dflt;
  logic [7:0]  fr_s, ph_s;
  logic        tog_s;
  int checks = 0, failures = 0;
  int n_switch = 0, n_wrap = 0, n_tog_cycles = 0;

  dds_phase_accumulator #(.ACC_W(32), .SLICE_W(4), .OUT_W(32)) u_full (
    .clk, .rst_n, .fr, .cin_toggle_en(tog), .phase_o(ph_full));
  dds_phase_accumulator u_dflt (
    .clk, .rst_n, .fr, .cin_toggle_en(tog), .phase_o(ph_dflt));
  dds_phase_accumulator #(.ACC_W(8), .SLICE_W(4), .OUT_W(8)) u_small (
    .clk, .rst_n, .fr(fr_s), .cin_toggle_en(tog_s), .phase_o(ph_s));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: A(m) after edge m (m counts edges after reset release)
  logic [31:0] hist [0:8191];
  logic [31:0] acc_ref = 0;
  logic        cin_ref = 0;
  int          m = -1;
  always @(posedge clk) if (rst_n) begin
    logic [32:0] s;
    m++;
    cin_ref = tog ? ~cin_ref : 1'b0;
    s = {1'b0, acc_ref} + {1'b0, fr} + 33'(cin_ref);
    if (s[32]) n_wrap++;
    if (tog) n_tog_cycles++;
    acc_ref = s[31:0];
    hist[m] = acc_ref;
  end

  function automatic logic [31:0] a_at(int k);
    return (k < 0) ? 32'd0 : hist[k];
  endfunction

  task automatic check_now();
    logic [31:0] e;
    e = a_at(m - LAT);
    checks += 2;
    if (ph_full !== e) begin
      failures++;
      if (failures < 10) $display("m=%0d full got %h exp %h", m, ph_full, e);
    end
    if (ph_dflt !== e[31:20]) begin
      failures++;
      if (failures < 10) $display("m=%0d 12-bit got %h exp %h", m, ph_dflt, e[31:20]);
    end
  endtask

  bit seen [256];
  int nseen;

  initial begin
    fr = 32'h1234_5679; tog = 0; fr_s = 8'h40; tog_s = 0;
    repeat (3) @(negedge clk);
    checks++; if (ph_full !== 0 || ph_dflt !== 0) failures++;
    rst_n = 1;
    // Part 1: random words and toggle, checked every cycle
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (m >= 0) check_now();
      if ($urandom_range(0, 19) == 0) begin
        fr = (i % 3 == 0) ? 32'hFFFF_FFFF - 32'($urandom_range(0, 3)) : $urandom;
        n_switch++;
      end
      if ($urandom_range(0, 49) == 0) tog = ~tog;
    end
    // Part 2: carry-toggle period on the 8-bit instance
    for (int t = 0; t < 2; t++) begin
      @(negedge clk);
      tog_s = (t != 0);
      repeat (LAT + 2) @(negedge clk);      // let the pipeline fill
      foreach (seen[v]) seen[v] = 0;
      nseen = 0;
      for (int i = 0; i < 512; i++) begin
        @(negedge clk);
        if (!seen[ph_s]) begin seen[ph_s] = 1; nseen++; end
      end
      checks++;
      if (nseen != ((t != 0) ? 256 : 4)) begin
        failures++;
        $display("toggle=%0d: %0d distinct phases, expected %0d", t, nseen, (t != 0) ? 256 : 4);
      end
    end
    // Every mechanism must have happened
    checks += 3;
    if (n_switch == 0)     begin failures++; $display("no frequency switch"); end
    if (n_wrap == 0)       begin failures++; $display("no accumulator overflow"); end
    if (n_tog_cycles == 0) begin failures++; $display("carry toggle never on"); end
    $display("switches=%0d overflows=%0d toggle_cycles=%0d", n_switch, n_wrap, n_tog_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
