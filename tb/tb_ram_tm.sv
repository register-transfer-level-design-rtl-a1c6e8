// tb_ram_tm: self-checking testbench of the RAM-based transpose memory.
//
// A source sends TUs as row vectors with random samples (lanes at or above N
// hold junk that must be ignored), and a sink checks that every column vector
// that comes out is the matching column of the TU sent, that unused lanes
// are zero, and that out_size and out_last are right.
//   Part 1: four 32x32 TUs back to back with no stalls. Each TU must take
//           32 * 32 / 4 cycles to write (four samples per clock) and
//           32 * (32 / 4 + 2) cycles to read (eight chunk reads, one cycle of
//           read latency and one output cycle per column).
//   Part 2: a 4x4 TU right after a 32x32 one, the first column of which must
//           be offered 4 / 4 + 2 cycles after its last row is taken.
//   Part 3: a random mix of sizes with random stalls on both sides.
module tb_ram_tm;
  import idct_tm_pkg::*;

  localparam int MAX_N  = 32;
  localparam int DATA_W = 16;
  localparam int NT     = 60;   // TUs in all
  localparam int NT_THR = 4;    // TUs of part 1

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid = 1'b0, in_ready;
  tu_size_e          in_size = TU4;
  logic [DATA_W-1:0] in_data [MAX_N];
  logic              out_valid, out_ready = 1'b0, out_last;
  tu_size_e          out_size;
  logic [DATA_W-1:0] out_data [MAX_N];

  ram_tm #(.MAX_N(MAX_N), .DATA_W(DATA_W)) dut (.*);

  logic [DATA_W-1:0] blk [NT][MAX_N][MAX_N];
  tu_size_e          sz  [NT];
  int checks = 0, failures = 0;
  int cyc = 0;
  int stall_in = 0, stall_out = 0;  // percent
  int t_first_in = -1, t_last_out = -1;
  int ot = 0, oc = 0;               // TU and column expected next
  int last_row_cyc [NT];
  int first_col_cyc [NT];
  int n_in_stalls = 0, n_out_stalls = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // source
  task automatic send_tu(int t);
    int n;
    n = int'(tu_len(sz[t]));
    for (int r = 0; r < n; r++) begin
      while (stall_in > 0 && $urandom_range(99) < stall_in) begin
        in_valid <= 1'b0;
        n_in_stalls++;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_size  <= sz[t];
      for (int c = 0; c < MAX_N; c++) in_data[c] <= (c < n) ? blk[t][r][c] : DATA_W'($urandom);
      @(negedge clk);
      if (t_first_in < 0) t_first_in = cyc;
      while (!in_ready) @(negedge clk);
      if (r == n - 1) last_row_cyc[t] = cyc;
      @(posedge clk);
    end
  endtask

  // sink
  initial begin
    forever begin
      @(posedge clk);
      out_ready <= (stall_out > 0) ? ($urandom_range(99) >= stall_out) : 1'b1;
      @(negedge clk);
      if (out_valid && !out_ready) n_out_stalls++;
      if (out_valid && out_ready && ot < NT) begin
        int n;
        bit ok;
        n  = int'(tu_len(sz[ot]));
        ok = 1'b1;
        for (int r = 0; r < MAX_N; r++)
          if (out_data[r] !== ((r < n) ? blk[ot][r][oc] : '0)) ok = 1'b0;
        check(ok, $sformatf("data of TU %0d column %0d", ot, oc));
        check(out_size == sz[ot] && out_last == (oc == n - 1),
              $sformatf("size/last of TU %0d column %0d", ot, oc));
        if (oc == 0) first_col_cyc[ot] = cyc;
        t_last_out = cyc;
        if (oc == n - 1) begin
          oc = 0;
          ot++;
        end else begin
          oc++;
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) begin
      if (t < NT_THR)          sz[t] = TU32;
      else if (t == NT_THR)    sz[t] = TU4;
      else                     sz[t] = tu_size_e'($urandom_range(3));
      for (int r = 0; r < MAX_N; r++)
        for (int c = 0; c < MAX_N; c++) blk[t][r][c] = DATA_W'($urandom);
    end
    sz[NT_THR + 1] = TU8;  // a size step down and one up in the random part
    sz[NT_THR + 2] = TU32;
    sz[NT_THR + 3] = TU16;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // part 1: full rate
    for (int t = 0; t < NT_THR; t++) send_tu(t);
    in_valid <= 1'b0;
    wait (ot == NT_THR);
    @(posedge clk);
    check(t_last_out - t_first_in + 1 == NT_THR * (32 * 32 / 4 + 32 * (32 / 4 + 2)),
          $sformatf("32x32 stream took %0d cycles", t_last_out - t_first_in + 1));

    // part 2: latency of a small TU
    send_tu(NT_THR);
    in_valid <= 1'b0;
    wait (ot == NT_THR + 1);
    check(first_col_cyc[NT_THR] == last_row_cyc[NT_THR] + 3,
          $sformatf("4x4 first column %0d cycles after last row",
                    first_col_cyc[NT_THR] - last_row_cyc[NT_THR]));

    // part 3: random sizes and stalls
    stall_in  = 25;
    stall_out = 25;
    for (int t = NT_THR + 1; t < NT; t++) send_tu(t);
    in_valid <= 1'b0;
    wait (ot == NT);
    check(n_in_stalls > 0 && n_out_stalls > 0, "stalls were exercised");
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
