// dac_decoder: digital part of the 10-bit segmented current-steering DAC.
//
// The code is split into 6 MSBs, which switch unit current cells, and
// 4 LSBs, which drive a binary-weighted array. Stage 1 is the digit input
// register. Stage 2 decodes: b9..b7 through a row decoder and b6..b4 through
// a column decoder into 8 + 8 thermometer lines; logical cell k (1..63) is on
// when k <= code[9:4], formed from its row and column lines as
// row_below | (row_equal & col_below). Each logical cell is then placed at
// the physical position given by the switching sequence below, which spreads
// consecutive cells over the array so graded and symmetrical current-source
// errors cancel. Cell 64 is never switched. The 4 LSBs pass through a
// register (the dummy decoder) so they switch on the same edge as the
// unary cells. A registered copy of the input code is the digital output.
//
// Physical array (4 rows x 16 columns, row-major in cells[]), the number is
// the order in which each cell turns on:
//   62 58 54 50 49 53 57 61 31 27 23 19 20 24 28 32
//   46 42 38 34 33 37 41 45 15 11  7  3  4  8 12 16
//   14 10  6  2  1  5  9 13 47 43 39 35 36 40 44 48
//   30 26 22 18 17 21 25 29 63 59 55 51 52 56 60 64
// The 6 + 4 split, the row/column/dummy decoders and the sequence follow the
// published DAC; the row-major packing of cells[] is this design's.
// Timing: cells, bin and dout change two clocks after code.
module dac_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [9:0]  code,
  output logic [63:0] cells,   // cells[16*r + c]: unit cell at row r, column c
  output logic [3:0]  bin,     // binary array switches, weight 8,4,2,1
  output logic [9:0]  dout     // digital video output
);
  localparam int SEQ [64] = '{
    62, 58, 54, 50, 49, 53, 57, 61, 31, 27, 23, 19, 20, 24, 28, 32,
    46, 42, 38, 34, 33, 37, 41, 45, 15, 11,  7,  3,  4,  8, 12, 16,
    14, 10,  6,  2,  1,  5,  9, 13, 47, 43, 39, 35, 36, 40, 44, 48,
    30, 26, 22, 18, 17, 21, 25, 29, 63, 59, 55, 51, 52, 56, 60, 64};

  logic [9:0]  code_r;
  logic [7:0]  row_below, row_eq, col_below;
  logic [64:1] on;          // logical cells
  logic [63:0] cells_n;

  // row / column decoders
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      row_below[i] = 3'(i) < code_r[9:7];
      row_eq[i]    = 3'(i) == code_r[9:7];
      col_below[i] = 3'(i) < code_r[6:4];
    end
    for (int k = 1; k <= 64; k++)
      on[k] = row_below[(k-1)/8] | (row_eq[(k-1)/8] & col_below[(k-1)%8]);
    for (int p = 0; p < 64; p++)
      cells_n[p] = on[SEQ[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_r <= '0;
      cells  <= '0;
      bin    <= '0;
      dout   <= '0;
    end else begin
      code_r <= code;
      cells  <= cells_n;
      bin    <= code_r[3:0];
      dout   <= code_r;
    end
  end
endmodule
