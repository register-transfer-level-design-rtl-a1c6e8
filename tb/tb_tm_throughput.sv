// tb_tm_throughput: throughput of the two transpose memories for each HEVC
// TU size, at the default parameters.
//
// For each size N = 4, 8, 16 and 32, a stream of T = 8 TUs is offered to both
// sides of idct2d_tm_top with no stall on either end, and the cycles from the
// first row offered to the last column taken are counted:
//   register form: (T + 1) * N cycles (one vector per clock, the last TU
//                  drains in a phase of its own);
//   RAM form:      T * (N * N / 4 + N * (N / 4 + 2)) cycles (write at four
//                  samples per clock, then per column N / 4 reads, one cycle
//                  of read latency and one output cycle).
// Every column is also checked against the TU sent. The samples per clock
// of both forms are printed, as a basis for comparing them.
module tb_tm_throughput;
  import idct_tm_pkg::*;

  localparam int MAX_N = 32;
  localparam int T     = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid [2];
  logic        in_ready [2];
  tu_size_e    in_size  [2];
  logic [15:0] in_data  [2][MAX_N];
  logic        out_valid [2], out_last [2];
  logic        out_ready [2];
  tu_size_e    out_size [2];
  logic [15:0] out_data [2][MAX_N];

  idct2d_tm_top dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .reg_in_valid (in_valid[0]),  .reg_in_ready (in_ready[0]),  .reg_in_size (in_size[0]),
    .reg_in_data  (in_data[0]),   .reg_out_valid(out_valid[0]), .reg_out_ready(out_ready[0]),
    .reg_out_size (out_size[0]),  .reg_out_last (out_last[0]),  .reg_out_data (out_data[0]),
    .ram_in_valid (in_valid[1]),  .ram_in_ready (in_ready[1]),  .ram_in_size (in_size[1]),
    .ram_in_data  (in_data[1]),   .ram_out_valid(out_valid[1]), .ram_out_ready(out_ready[1]),
    .ram_out_size (out_size[1]),  .ram_out_last (out_last[1]),  .ram_out_data (out_data[1])
  );

  logic [15:0] blk [T][MAX_N][MAX_N];
  tu_size_e cur;
  int checks = 0, failures = 0;
  int cyc = 0;
  int t_first [2], t_last [2], ot [2], oc [2];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic source(int s);
    int n;
    n = int'(tu_len(cur));
    for (int t = 0; t < T; t++)
      for (int r = 0; r < n; r++) begin
        in_valid[s] <= 1'b1;
        in_size[s]  <= cur;
        for (int c = 0; c < MAX_N; c++) in_data[s][c] <= blk[t][r][c];
        @(negedge clk);
        if (t_first[s] < 0) t_first[s] = cyc;
        while (!in_ready[s]) @(negedge clk);
        @(posedge clk);
      end
    in_valid[s] <= 1'b0;
  endtask

  for (genvar s = 0; s < 2; s++) begin : g_sink
    initial begin
      out_ready[s] = 1'b1;
      forever begin
        @(negedge clk);
        if (rst_n && out_valid[s] && ot[s] < T) begin
          int n;
          bit ok;
          n  = int'(tu_len(cur));
          ok = (out_size[s] == cur) && (out_last[s] == (oc[s] == n - 1));
          for (int r = 0; r < n; r++) if (out_data[s][r] !== blk[ot[s]][r][oc[s]]) ok = 1'b0;
          check(ok, $sformatf("side %0d TU %0d column %0d", s, ot[s], oc[s]));
          t_last[s] = cyc;
          if (oc[s] == n - 1) begin
            oc[s] = 0;
            ot[s]++;
          end else begin
            oc[s]++;
          end
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      in_valid[s] = 1'b0;
      in_size[s]  = TU4;
      for (int c = 0; c < MAX_N; c++) in_data[s][c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int z = 0; z < 4; z++) begin
      int n, exp_reg, exp_ram;
      cur = tu_size_e'(z);
      n   = int'(tu_len(cur));
      for (int t = 0; t < T; t++)
        for (int r = 0; r < MAX_N; r++)
          for (int c = 0; c < MAX_N; c++) blk[t][r][c] = 16'($urandom);
      for (int s = 0; s < 2; s++) begin
        t_first[s] = -1;
        ot[s] = 0;
        oc[s] = 0;
      end
      @(posedge clk);
      fork
        source(0);
        source(1);
      join
      wait (ot[0] == T && ot[1] == T);
      @(posedge clk);
      exp_reg = (T + 1) * n;
      exp_ram = T * (n * n / 4 + n * (n / 4 + 2));
      check(t_last[0] - t_first[0] + 1 == exp_reg,
            $sformatf("register form %0dx%0d: %0d cycles, expected %0d", n, n, t_last[0] - t_first[0] + 1, exp_reg));
      check(t_last[1] - t_first[1] + 1 == exp_ram,
            $sformatf("RAM form %0dx%0d: %0d cycles, expected %0d", n, n, t_last[1] - t_first[1] + 1, exp_ram));
      $display("%0dx%0d TUs: register form %0d cycles (%0.2f samples/clock), RAM form %0d cycles (%0.2f samples/clock)",
               n, n, t_last[0] - t_first[0] + 1, real'(T * n * n) / (t_last[0] - t_first[0] + 1),
               t_last[1] - t_first[1] + 1, real'(T * n * n) / (t_last[1] - t_first[1] + 1));
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
