// dds_rom: pipelined read-only memory organised as a wired-NOR matrix.
//
// The memory-point matrix has ROWS word lines and COLS*WIDTH bit lines; each
// row holds COLS words side by side. A memory point is a transistor between a
// bit line and the row's ground switch: a selected word line with a transistor
// pulls the precharged bit line low, so a bit line reads 1 unless some selected
// point has a transistor. Here a transistor is placed wherever the stored bit
// is 0. The matrix, its wired-NOR bit lines and the pipeline registers after
// the word/bit line decoders and before the output buffer follow the published
// ROM; the row/column organisation (COLS words per row), the contents and the
// exact register positions are this design's choices. The precharge and the
// ground switches are circuit techniques with no logic function: the bit-line
// evaluation is modelled as one combinational step.
//
// Contents come from INIT_FILE, a hex file of DEPTH words read with $readmemh.
//
// Timing: addr is sampled at rising edge n into the decoder register (one-hot
// word lines, one-hot column select); the selected word is captured in the
// output register at edge n+1 and drives dout after it: two registers, one
// cycle of latency (ROM_LAT), one new address every clock. rst_n clears both registers asynchronously.
module dds_rom #(
  parameter int unsigned DEPTH     = 128,
  parameter int unsigned WIDTH     = 7,
  parameter int unsigned COLS      = 4,   // words per word line (power of 2)
  parameter string       INIT_FILE = dds_pkg::COARSE_ROM_FILE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         dout
);

  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CW    = $clog2(COLS);
  localparam int unsigned ROWS  = DEPTH / COLS;
  localparam int unsigned BL    = COLS * WIDTH;   // bit lines

  initial begin
    assert (DEPTH % COLS == 0 && COLS == (1 << CW))
      else $error("COLS must be a power of two that divides DEPTH");
  end

  // Stored words and the transistor pattern of the matrix
  logic [WIDTH-1:0] mem [DEPTH];
  initial $readmemh(INIT_FILE, mem);

  logic [ROWS-1:0][BL-1:0] point;   // 1 = transistor present
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        point[r][c*WIDTH +: WIDTH] = ~mem[r*COLS + c];
  end

  // Stage 1: word-line and bit-line (column) decoders, registered
  logic [ROWS-1:0] wl_q;
  logic [COLS-1:0] cs_q;
  logic [AW-CW-1:0] row;
  localparam int unsigned CWX = (CW > 0) ? CW : 1;   // at least one bit
  logic [CWX-1:0]   col;
  if (CW == 0) begin : g_onecol
    assign row = addr;
    assign col = '0;
  end else begin : g_cols
    assign row = addr[AW-1:CW];
    assign col = addr[CW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wl_q <= '0;
      cs_q <= '0;
    end else begin
      wl_q <= ROWS'(1) << row;
      cs_q <= COLS'(1) << col;   // col is 0 when COLS = 1
    end
  end

  // Stage 2: wired-NOR bit lines and column multiplexer
  logic [BL-1:0]    bitline;
  logic [WIDTH-1:0] word;
  always_comb begin
    bitline = '1;   // precharged
    for (int r = 0; r < ROWS; r++)
      bitline &= ~({BL{wl_q[r]}} & point[r]);
    word = '0;
    for (int c = 0; c < COLS; c++)
      word |= {WIDTH{cs_q[c]}} & bitline[c*WIDTH +: WIDTH];
  end

  // Register before the output buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= word;
  end

endmodule
