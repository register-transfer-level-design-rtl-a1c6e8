// idct2d_tm_top: the transpose stage of an HEVC 2-D inverse DCT, in both of
// its forms.
//
// A 2-D IDCT by row-column decomposition runs a 1-D IDCT over the rows of a
// TU, transposes the result, and runs a second 1-D IDCT over what were the
// columns. This top holds the part between the two 1-D passes twice, side by
// side, so that the two ways of building it can be used and compared under
// the same traffic:
//   reg_* : reg_tm, a 32x32 array of registers whose shift direction swaps
//           at every TU; one vector in and one out per clock.
//   ram_* : ram_tm, four single-port RAM banks with diagonal mapping and an
//           address generator; four samples per clock, write then read.
// The 1-D IDCT units are not part of this RTL. For each form, *_in_* takes
// the row vectors produced by the first 1-D unit and *_out_* gives the column
// vectors to the second 1-D unit. The control path between the units is the
// valid/ready handshake: the second unit sees out_valid low while a TU is
// still being transposed, which happens whenever the first unit has not yet
// produced a whole TU, or, for the RAM form, while a TU is being written.
// Vectors are MAX_N lanes of DATA_W bits; a TU of N x N uses lanes 0 to N-1.
// Timing of each side is that of its transpose memory.
module idct2d_tm_top
  import idct_tm_pkg::*;
#(
  parameter int unsigned MAX_N  = 32,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // register-based transpose memory
  input  logic              reg_in_valid,
  output logic              reg_in_ready,
  input  tu_size_e          reg_in_size,
  input  logic [DATA_W-1:0] reg_in_data  [MAX_N],
  output logic              reg_out_valid,
  input  logic              reg_out_ready,
  output tu_size_e          reg_out_size,
  output logic              reg_out_last,
  output logic [DATA_W-1:0] reg_out_data [MAX_N],
  // RAM-based transpose memory
  input  logic              ram_in_valid,
  output logic              ram_in_ready,
  input  tu_size_e          ram_in_size,
  input  logic [DATA_W-1:0] ram_in_data  [MAX_N],
  output logic              ram_out_valid,
  input  logic              ram_out_ready,
  output tu_size_e          ram_out_size,
  output logic              ram_out_last,
  output logic [DATA_W-1:0] ram_out_data [MAX_N]
);

  reg_tm #(.MAX_N(MAX_N), .DATA_W(DATA_W)) u_reg_tm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (reg_in_valid),
    .in_ready (reg_in_ready),
    .in_size  (reg_in_size),
    .in_data  (reg_in_data),
    .out_valid(reg_out_valid),
    .out_ready(reg_out_ready),
    .out_size (reg_out_size),
    .out_last (reg_out_last),
    .out_data (reg_out_data)
  );

  ram_tm #(.MAX_N(MAX_N), .DATA_W(DATA_W), .BANKS(4)) u_ram_tm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ram_in_valid),
    .in_ready (ram_in_ready),
    .in_size  (ram_in_size),
    .in_data  (ram_in_data),
    .out_valid(ram_out_valid),
    .out_ready(ram_out_ready),
    .out_size (ram_out_size),
    .out_last (ram_out_last),
    .out_data (ram_out_data)
  );

endmodule
