// tm_cell: single-point transpose memory, one sample of the register-based
// transpose array.
//
// The cell is a DATA_W-bit register with a three-way input multiplexer. When
// the array shifts along rows (dir = 1) the cell takes the value of its right
// neighbour, when it shifts along columns (dir = 0) the value of the
// neighbour below, and when the cell sits on the entry edge of the current
// TU (load_ext = 1) it takes the sample of the input bus instead. Because the
// shift direction is swapped from one TU to the next, a TU written in along
// one axis is read out along the other, which is the transposition. The cell
// only changes when en is high, so idle parts of the array do not toggle.
//
// Timing: one clock edge from inputs to q. The register is not reset: every
// sample that is read out was written by the same transfer first. The
// single-point cell and the swapped direction come from the source design;
// the exact multiplexer and the enable are this design's choice.
module tm_cell #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              en,          // shift this cycle
  input  logic              dir,         // 1: take from the right, 0: from below
  input  logic              load_ext,    // cell is on the entry edge: take ext
  input  logic [DATA_W-1:0] ext,         // sample from the input bus
  input  logic [DATA_W-1:0] from_right,  // neighbour in the same row
  input  logic [DATA_W-1:0] from_below,  // neighbour in the same column
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] d;

  always_comb begin
    if (load_ext)  d = ext;
    else if (dir)  d = from_right;
    else           d = from_below;
  end

  always_ff @(posedge clk) begin
    if (en) q <= d;
  end

endmodule
