// multi_transform: four-parallel 2-D 4x4 multitransform engine
// (forward DCT, inverse DCT or Hadamard).
//
// A 4x4 block enters one row per advancing cycle. The first 1-D unit
// transforms the row at once and writes it into a 4x4 array of transpose
// registers. The array's data path alternates every four advances between
// "downward" (the new row enters the top row, the bottom row leaves) and
// "leftward" (the new row enters the right column, the left column leaves),
// so a stored block is always read out across its columns while the next
// block is written in. The leaving vector passes through the second 1-D
// unit. The engine is fully pipelined: 100% utilisation, latency four
// advances.
//
// Interface: en advances the pipeline (array, direction counter and the
// output-enable chain); de marks the row at x_in as valid and is carried
// down a four-stage chain to become oe, so a block pushed in with de comes
// out while the next four rows (real or dummy, de=0) are pushed in. Output
// vector number k of a block (out_idx = k) is column k of the 2-D result
// Y = T X T' (T the 1-D matrix), i.e. row k of Y transposed; feeding those
// vectors to a second engine set to TR_IDCT returns the rows of the block.
// sel is sampled with the first row of each block and kept for that block's
// second pass. No scaling or rounding is applied inside.
//
// The two 1-D units, transpose array, downward/leftward/stall data path,
// four-cycle latency and the DE->OE chain follow the document; the
// separate advance input, the out_idx output and the width are this
// design's choices.
module multi_transform
  import intra_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,        // advance one step
  input  logic                de,        // x_in holds a valid row
  input  tr_sel_e             sel,       // transform of the block being entered
  input  logic signed [W-1:0] x_in [4],
  output logic                oe,        // y_out valid this cycle
  output logic [1:0]          out_idx,   // which column of the block leaves
  output logic signed [W-1:0] y_out [4]
);

  logic signed [W-1:0] h [4];          // horizontal (first 1-D) result
  logic signed [W-1:0] arr [4][4];     // transpose registers [row][col]
  logic signed [W-1:0] v_in [4];       // vector leaving the array
  logic [1:0]          phase;          // row number within the block
  logic                leftward;       // current data-path direction
  logic [3:0]          de_chain;
  tr_sel_e             sel_in_q, sel_out_q, sel_cur;

  // sel of the block being entered: live on its first row, held after
  assign sel_cur = (phase == 2'd0) ? sel : sel_in_q;

  transform_1d #(.W(W)) u_h (.sel(sel_cur),   .x(x_in), .y(h));
  transform_1d #(.W(W)) u_v (.sel(sel_out_q), .x(v_in), .y(y_out));

  // Leaving vector, ordered so that element i is row i of the stored block.
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (leftward) v_in[i] = arr[3-i][0];   // left column, oldest row at bottom
      else          v_in[i] = arr[3][i];     // bottom row, oldest row at left
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) arr[r][c] <= '0;
      phase     <= '0;
      leftward  <= 1'b0;
      de_chain  <= '0;
      sel_in_q  <= TR_DCT;
      sel_out_q <= TR_DCT;
    end else if (en) begin
      if (leftward) begin
        for (int r = 0; r < 4; r++) begin
          for (int c = 0; c < 3; c++) arr[r][c] <= arr[r][c+1];
          arr[r][3] <= h[3-r];
        end
      end else begin
        for (int c = 0; c < 4; c++) begin
          for (int r = 3; r > 0; r--) arr[r][c] <= arr[r-1][c];
          arr[0][c] <= h[c];
        end
      end
      de_chain <= {de_chain[2:0], de};
      phase    <= phase + 2'd1;
      if (phase == 2'd0) sel_in_q <= sel;
      if (phase == 2'd3) begin
        leftward  <= ~leftward;
        sel_out_q <= sel_cur;
      end
    end
  end

  assign oe      = en & de_chain[3];
  assign out_idx = phase;

endmodule
