// tb_dds_ones_complement: self-checking test of the registered conditional
// one's complement. Random data and control; the output after each rising
// edge must equal the input sampled at that edge, inverted when inv was 1.
module tb_dds_ones_complement;
  localparam int W = 10;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic inv;
  int checks = 0, failures = 0;

  dds_ones_complement #(.W(W)) dut (.clk, .rst_n, .d, .inv, .q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_q;
    d = '0; inv = 0;
    repeat (2) @(negedge clk);
    checks++; if (q !== '0) failures++;   // reset value
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = W'($urandom); inv = 1'($urandom);
      exp_q = inv ? (W'(2**W - 1) - d) : d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("mismatch d=%h inv=%b q=%h exp=%h", d, inv, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
