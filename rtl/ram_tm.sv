// ram_tm: RAM-based transpose memory for HEVC transform units from 4x4 to
// 32x32.
//
// The TU is stored in BANKS single-port RAM banks (sram_bank) using the
// diagonal mapping computed by agm: sample (r, c) goes to bank (r + c) mod
// BANKS. Every clock the memory moves BANKS samples, one per bank, and a
// barrel rotation by r mod BANKS (on writes) or c mod BANKS (on reads) lines
// the samples up with the banks.
//
// Operation is in two halves per TU, because a single-port bank cannot be read
// and written in the same cycle:
//   write: the N row vectors of the TU are taken one after the other; each
//          row is written in N / BANKS cycles, and in_ready is raised in the
//          cycle that writes its last chunk, so the row is consumed then.
//   read:  for each column c the N / BANKS chunk reads are issued on
//          consecutive cycles, the data of each read is captured one cycle
//          later into an output register, and the finished column is offered
//          on out_*. After the last column is taken the next TU may enter.
// A TU of N x N therefore takes N * N / BANKS cycles to write and
// N * (N / BANKS + 2) cycles to read (fewer if the output is accepted at
// once), against about N cycles in and N out for the register array.
//
// The interface is the same as that of reg_tm: row vectors in, column vectors
// out, valid/ready on both sides, in_size constant within a TU, out_last on
// the last column, lanes at or above N zero on output. The four banks and the
// address generator follow the source design; the sequencing, the handshake
// and the mapping formula are this design's own.
module ram_tm
  import idct_tm_pkg::*;
#(
  parameter int unsigned MAX_N  = 32,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned BANKS  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  tu_size_e          in_size,
  input  logic [DATA_W-1:0] in_data  [MAX_N],
  output logic              out_valid,
  input  logic              out_ready,
  output tu_size_e          out_size,
  output logic              out_last,
  output logic [DATA_W-1:0] out_data [MAX_N]
);

  localparam int unsigned DEPTH   = MAX_N * MAX_N / BANKS;
  localparam int unsigned LINE_W  = $clog2(MAX_N);
  localparam int unsigned CHUNK_W = (MAX_N > BANKS) ? $clog2(MAX_N / BANKS) : 1;
  localparam int unsigned ADDR_W  = $clog2(DEPTH);
  localparam int unsigned ROT_W   = (BANKS > 1) ? $clog2(BANKS) : 1;

  typedef enum logic [1:0] {
    S_WRITE,   // taking row vectors
    S_READ,    // issuing the chunk reads of one column
    S_OUT      // offering the column
  } state_e;

  state_e             state_q;
  tu_size_e           size_q;
  logic [LINE_W-1:0]  line_q;
  logic [CHUNK_W-1:0] chunk_q;
  logic               rd_v_q;
  logic [CHUNK_W-1:0] rd_chunk_q;
  logic [ROT_W-1:0]   rd_rot_q;
  logic [DATA_W-1:0]  obuf_q [MAX_N];

  logic               first;
  tu_size_e           cur_size;
  logic [5:0]         n;
  logic               last_chunk, last_line;

  logic [ADDR_W-1:0]  bank_addr [BANKS];
  logic [ROT_W-1:0]   rot;
  logic               bank_ce, bank_we;
  logic [DATA_W-1:0]  wdata [BANKS];
  logic [DATA_W-1:0]  rdata [BANKS];

  always_comb begin
    first      = (state_q == S_WRITE) && (line_q == '0) && (chunk_q == '0);
    cur_size   = first ? in_size : size_q;
    n          = tu_len(cur_size);
    last_chunk = (32'(chunk_q) == 32'(n) / BANKS - 1);
    last_line  = (32'(line_q) == 32'(n) - 1);
    bank_ce    = ((state_q == S_WRITE) && in_valid) || (state_q == S_READ);
    bank_we    = (state_q == S_WRITE);
    for (int unsigned b = 0; b < BANKS; b++) begin
      wdata[b] = in_data[32'(chunk_q) * BANKS + (b + BANKS - 32'(rot)) % BANKS];
    end
    in_ready  = (state_q == S_WRITE) && last_chunk;
    out_valid = (state_q == S_OUT) && !rd_v_q;
    out_last  = (state_q == S_OUT) && last_line;
    out_size  = size_q;
  end

  agm #(.MAX_N(MAX_N), .BANKS(BANKS)) u_agm (
    .wr       (state_q == S_WRITE),
    .line     (line_q),
    .chunk    (chunk_q),
    .bank_addr(bank_addr),
    .rot      (rot)
  );

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    sram_bank #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_bank (
      .clk  (clk),
      .ce   (bank_ce),
      .we   (bank_we),
      .addr (bank_addr[b]),
      .wdata(wdata[b]),
      .rdata(rdata[b])
    );
  end

  // read data arrives one cycle after the address: un-rotate it into place
  always_ff @(posedge clk) begin
    if (rd_v_q) begin
      for (int unsigned m = 0; m < BANKS; m++) begin
        obuf_q[32'(rd_chunk_q) * BANKS + m] <= rdata[(m + 32'(rd_rot_q)) % BANKS];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_WRITE;
      size_q     <= TU4;
      line_q     <= '0;
      chunk_q    <= '0;
      rd_v_q     <= 1'b0;
      rd_chunk_q <= '0;
      rd_rot_q   <= '0;
    end else begin
      rd_v_q     <= (state_q == S_READ);
      rd_chunk_q <= chunk_q;
      rd_rot_q   <= rot;
      unique case (state_q)
        S_WRITE: if (in_valid) begin
          if (first) size_q <= in_size;
          if (last_chunk) begin
            chunk_q <= '0;
            if (last_line) begin
              line_q  <= '0;
              state_q <= S_READ;
            end else begin
              line_q <= line_q + 1'b1;
            end
          end else begin
            chunk_q <= chunk_q + 1'b1;
          end
        end
        S_READ: begin
          if (last_chunk) begin
            chunk_q <= '0;
            state_q <= S_OUT;
          end else begin
            chunk_q <= chunk_q + 1'b1;
          end
        end
        S_OUT: if (out_valid && out_ready) begin
          if (last_line) begin
            line_q  <= '0;
            state_q <= S_WRITE;
          end else begin
            line_q  <= line_q + 1'b1;
            state_q <= S_READ;
          end
        end
        default: state_q <= S_WRITE;
      endcase
    end
  end

  for (genvar k = 0; k < MAX_N; k++) begin : g_out
    assign out_data[k] = (6'(k) < tu_len(size_q)) ? obuf_q[k] : '0;
  end

  a_size_fits : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> tu_len(in_size) <= 6'(MAX_N));
  a_in_stable : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_size));

endmodule
