// reg_tm: register-based transpose memory for HEVC transform units from 4x4
// to 32x32.
//
// The memory is a MAX_N x MAX_N array of tm_cell registers. A TU of N x N
// samples enters as N vectors of N samples (the rows produced by the first
// 1-D IDCT pass), one vector per accepted transfer, and leaves as N vectors
// that are its columns. The array never needs a second buffer: each TU is
// shifted in along one axis, and the next TU is shifted in along the other
// axis, which pushes the previous TU out, column by column, through the cells
// of row 0 or column 0. The axis therefore swaps at every TU.
//
//   dir = 0 (column shift): input lane j enters cell (E, j), every cell takes
//     the value of the cell below it, and output lane j is cell (0, j).
//   dir = 1 (row shift):    input lane i enters cell (i, E), every cell takes
//     the value of the cell to its right, and output lane i is cell (i, 0).
//
// One pass of the array over a TU boundary is a "phase" of L = max(N_in,
// N_out) shifts, where N_in is the size of the TU coming in and N_out that of
// the TU going out; the entry edge is E = L - 1. The incoming vectors are
// taken on the first N_in shifts and land in row/column 0 to N_in - 1; the
// outgoing columns leave on the first N_out shifts. Shifts beyond N_in take no
// input and shifts beyond N_out give no output, so TUs of different sizes may
// follow each other in any order. Cells outside the L x L corner hold still.
// When no new TU is offered while one is still stored, a phase with N_in = 0
// drains it, so the last TU of a stream is never stuck.
//
// Interface: valid/ready on both sides. in_size must stay constant for all
// vectors of one TU; out_size tells the size of the TU being read out and
// out_last marks its last column. Lanes at or above N are ignored on input
// and zero on output.
//
// Timing: a shift happens in every cycle in which the input (if the phase
// still needs one) and the output (if it still has one) both handshake, so a
// steady stream of equal TUs moves one vector in and one out per clock. The
// first column of a TU is offered in the cycle after its last row was taken.
// The swapped read/write direction and the support of all four sizes follow
// the source design; the phase rule for mixed sizes, the drain phase and the
// handshake are this design's own.
module reg_tm
  import idct_tm_pkg::*;
#(
  parameter int unsigned MAX_N  = 32,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // rows from the first 1-D IDCT
  input  logic              in_valid,
  output logic              in_ready,
  input  tu_size_e          in_size,
  input  logic [DATA_W-1:0] in_data  [MAX_N],
  // columns to the second 1-D IDCT
  output logic              out_valid,
  input  logic              out_ready,
  output tu_size_e          out_size,
  output logic              out_last,
  output logic [DATA_W-1:0] out_data [MAX_N]
);

  // phase state
  logic       active_q;
  logic       dir_q;
  logic [5:0] cnt_q, nin_q, nout_q, len_q;
  tu_size_e   blk_size_q;     // size of the TU being written in this phase
  logic       pend_q;         // a TU is stored and waits to be read out
  tu_size_e   pend_size_q;

  // values for the current cycle: the running phase, or the one that would
  // start now
  logic       eff_dir;
  logic [5:0] eff_cnt, eff_nin, eff_nout, eff_len, entry;
  logic       go, need_in, need_out, shift;
  logic [MAX_N-1:0] act;      // rows/columns inside the L x L corner

  always_comb begin
    if (active_q) begin
      eff_dir  = dir_q;
      eff_cnt  = cnt_q;
      eff_nin  = nin_q;
      eff_nout = nout_q;
      eff_len  = len_q;
    end else begin
      eff_dir  = ~dir_q;
      eff_cnt  = '0;
      eff_nin  = in_valid ? tu_len(in_size) : 6'd0;
      eff_nout = pend_q ? tu_len(pend_size_q) : 6'd0;
      eff_len  = (eff_nin > eff_nout) ? eff_nin : eff_nout;
    end
    entry     = eff_len - 6'd1;
    act       = MAX_N'((64'd1 << eff_len) - 64'd1);
    go        = active_q || in_valid || pend_q;
    need_in   = eff_cnt < eff_nin;
    need_out  = eff_cnt < eff_nout;
    shift     = go && (!need_in || in_valid) && (!need_out || out_ready);
    in_ready  = go && need_in && (!need_out || out_ready);
    out_valid = go && need_out && (!need_in || in_valid);
    out_last  = need_out && (eff_cnt == eff_nout - 6'd1);
    out_size  = pend_size_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q    <= 1'b0;
      dir_q       <= 1'b0;
      cnt_q       <= '0;
      nin_q       <= '0;
      nout_q      <= '0;
      len_q       <= '0;
      blk_size_q  <= TU4;
      pend_q      <= 1'b0;
      pend_size_q <= TU4;
    end else if (shift) begin
      if (!active_q) begin
        active_q   <= 1'b1;
        dir_q      <= eff_dir;
        nin_q      <= eff_nin;
        nout_q     <= eff_nout;
        len_q      <= eff_len;
        blk_size_q <= in_size;
      end
      if (eff_cnt == entry) begin
        active_q    <= 1'b0;
        cnt_q       <= '0;
        pend_q      <= (eff_nin != 6'd0);
        pend_size_q <= active_q ? blk_size_q : in_size;
      end else begin
        cnt_q <= eff_cnt + 6'd1;
      end
    end
  end

  // the cell array
  logic [DATA_W-1:0] q [MAX_N][MAX_N];

  for (genvar i = 0; i < MAX_N; i++) begin : g_row
    for (genvar j = 0; j < MAX_N; j++) begin : g_col
      logic [DATA_W-1:0] right, below;
      if (j + 1 < MAX_N) begin : g_r
        assign right = q[i][j+1];
      end else begin : g_re
        assign right = '0;
      end
      if (i + 1 < MAX_N) begin : g_b
        assign below = q[i+1][j];
      end else begin : g_be
        assign below = '0;
      end
      tm_cell #(.DATA_W(DATA_W)) u_cell (
        .clk       (clk),
        .en        (shift && act[i] && act[j]),
        .dir       (eff_dir),
        .load_ext  (eff_dir ? (6'(j) == entry) : (6'(i) == entry)),
        .ext       (eff_dir ? in_data[i] : in_data[j]),
        .from_right(right),
        .from_below(below),
        .q         (q[i][j])
      );
    end
  end

  for (genvar k = 0; k < MAX_N; k++) begin : g_out
    assign out_data[k] = (6'(k) < eff_nout) ? (eff_dir ? q[k][0] : q[0][k]) : '0;
  end

  // a TU may not be larger than the array, and the size must hold while a
  // transfer is waiting
  a_size_fits : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> tu_len(in_size) <= 6'(MAX_N));
  a_in_stable : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_size));

endmodule
