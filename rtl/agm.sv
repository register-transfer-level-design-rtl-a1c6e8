// agm: address generator module of the RAM-based transpose memory.
//
// The transpose buffer is split over BANKS single-port RAM banks. Sample
// (r, c) of a TU, r being the index of the row vector it arrived in and c its
// lane, is stored in bank (r + c) mod BANKS at word r * (MAX_N / BANKS) +
// c / BANKS. With this diagonal (skewed) mapping any BANKS consecutive
// samples of a row, and any BANKS consecutive samples of a column, sit in
// different banks, so a row can be written and a column read BANKS samples
// per clock with no bank conflict.
//
// For a write (wr = 1) of chunk k of row `line`, every bank gets the same
// word address line * (MAX_N / BANKS) + k, and bank b stores lane
// BANKS * k + ((b - rot) mod BANKS) of the row. For a read (wr = 0) of chunk
// k of column `line`, bank b is read at ((BANKS * k + m) * (MAX_N / BANKS) +
// line / BANKS), m = (b - rot) mod BANKS, and output lane BANKS * k + m of
// the column comes from bank (m + rot) mod BANKS. In both cases rot = line
// mod BANKS; the data path applies it as a rotation of the BANKS lanes.
//
// BANKS must be a power of two that divides MAX_N. Purely combinational. The split into four banks follows the source design;
// the exact mapping formula is this design's choice.
module agm #(
  parameter int unsigned MAX_N  = 32,
  parameter int unsigned BANKS  = 4,
  parameter int unsigned LINE_W = $clog2(MAX_N),
  parameter int unsigned CHUNK_W = (MAX_N > BANKS) ? $clog2(MAX_N / BANKS) : 1,
  parameter int unsigned ADDR_W = $clog2(MAX_N * MAX_N / BANKS),
  parameter int unsigned ROT_W  = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic               wr,                 // 1: row write, 0: column read
  input  logic [LINE_W-1:0]  line,               // row (write) or column (read) index
  input  logic [CHUNK_W-1:0] chunk,              // which group of BANKS samples
  output logic [ADDR_W-1:0]  bank_addr [BANKS],  // word address per bank
  output logic [ROT_W-1:0]   rot                 // lane rotation
);

  localparam int unsigned STRIDE = MAX_N / BANKS;  // words per TU row in a bank

  always_comb begin
    int unsigned ln, ck, m;
    ln  = 32'(line);
    ck  = 32'(chunk);
    rot = ROT_W'(ln % BANKS);
    for (int unsigned b = 0; b < BANKS; b++) begin
      m = (b + BANKS - ln % BANKS) % BANKS;
      if (wr) bank_addr[b] = ADDR_W'(ln * STRIDE + ck);
      else    bank_addr[b] = ADDR_W'((ck * BANKS + m) * STRIDE + ln / BANKS);
    end
  end

endmodule
