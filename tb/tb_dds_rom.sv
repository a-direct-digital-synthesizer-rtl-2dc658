// tb_dds_rom: self-checking test of the pipelined wired-NOR ROM.
//
// Three instances hold the coarse table (4 words per word line), the fine
// table (8 words per word line) and the coarse table again with one word per
// line. Expected words are recomputed from the table formulas in dds_ref_pkg,
// not read from the hex files. Addresses change every clock (full rate): first
// every address in order, then random ones; each word must appear exactly one
// edge after the edge that sampled its address (two registers).
module tb_dds_rom;
  import dds_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [6:0] addr, addr_d, addr_dd;
  logic [6:0] c4, c1;
  logic [2:0] f8;
  int checks = 0, failures = 0;

  dds_rom #(.DEPTH(128), .WIDTH(7), .COLS(4), .INIT_FILE("rtl/dds_coarse_rom.hex")) u_c4 (
    .clk, .rst_n, .addr, .dout(c4));
  dds_rom #(.DEPTH(128), .WIDTH(3), .COLS(8), .INIT_FILE("rtl/dds_fine_rom.hex")) u_f8 (
    .clk, .rst_n, .addr, .dout(f8));
  dds_rom #(.DEPTH(128), .WIDTH(7), .COLS(1), .INIT_FILE("rtl/dds_coarse_rom.hex")) u_c1 (
    .clk, .rst_n, .addr, .dout(c1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_tables();
    addr = '0;
    repeat (2) @(negedge clk);
    checks++; if (c4 !== '0 || f8 !== '0 || c1 !== '0) failures++;  // reset
    rst_n = 1;
    for (int i = 0; i < 128 + 1000; i++) begin
      @(negedge clk);
      // dout now holds the word for the address sampled two edges ago
      addr_dd = addr_d;
      addr_d  = addr;
      addr = (i < 128) ? 7'(i) : 7'($urandom);
      if (i > 1) begin
        checks += 3;
        if (c4 !== 7'(coarse_t[addr_dd])) begin
          failures++; $display("coarse(4) a=%0d got %0d exp %0d", addr_dd, c4, coarse_t[addr_dd]);
        end
        if (c1 !== 7'(coarse_t[addr_dd])) begin
          failures++; $display("coarse(1) a=%0d got %0d exp %0d", addr_dd, c1, coarse_t[addr_dd]);
        end
        if (f8 !== 3'(fine_t[addr_dd])) begin
          failures++; $display("fine a=%0d got %0d exp %0d", addr_dd, f8, fine_t[addr_dd]);
        end
      end
      @(posedge clk);   // samples addr into the decoder register
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
