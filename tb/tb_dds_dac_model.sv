// tb_dds_dac_model: self-checking test of the D/A converter model.
//
// Drives random 10-bit codes plus the extreme and one-hot codes, one per
// clock. After the rising edge that latches a code the true current must be
// code * I, the complementary current (1023 - code) * I, and the differential
// output 1023 - 2*code; between edges the outputs must hold.
module tb_dds_dac_model;
  logic clk = 0;
  logic [9:0] d, iout, iout_n;
  logic signed [10:0] vdiff;
  int checks = 0, failures = 0;

  dds_dac_model dut (.clk, .clk_n(~clk), .d, .iout, .iout_n, .vout_diff(vdiff));

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] code;
    d = '0;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      if (i < 2)       code = (i == 0) ? 10'd0 : 10'd1023;
      else if (i < 12) code = 10'(1 << (i - 2));
      else             code = 10'($urandom);
      d = code;
      @(posedge clk); #1;
      d = ~code;                         // a change between edges must not pass
      #2;
      checks += 3;
      if (int'(iout) != int'(code)) begin
        failures++; $display("code %0d: iout %0d", code, iout);
      end
      if (int'(iout_n) != 1023 - int'(code)) begin
        failures++; $display("code %0d: iout_n %0d", code, iout_n);
      end
      if (int'(vdiff) != 1023 - 2*int'(code)) begin
        failures++; $display("code %0d: vout_diff %0d", code, vdiff);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
