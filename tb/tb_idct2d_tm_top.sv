// tb_idct2d_tm_top: end-to-end testbench of the HEVC 2-D IDCT transpose stage,
// both forms at once, with every parameter at its default.
//
// Random TUs of coefficients (all four sizes, mixed, with sparse and dense
// blocks) pass through a full 2-D inverse transform on each side:
//   first 1-D IDCT (model, shift 7) -> transpose memory -> second 1-D IDCT
//   (model, shift 12) -> residual rows.
// The first pass runs over the coefficient columns, so the vectors entering
// the transpose memory are the columns of the intermediate block and those
// leaving it are its rows. The residual rows are compared with a reference
// computed directly in the testbench from the coefficients, so a wrong
// transposition, a lost or repeated vector or a wrong size shows as a
// mismatch. The source of each side stalls at random and the sink applies
// random back-pressure, like a first unit that is not always ready and a
// second unit that cannot always take data.
//
// Mechanisms counted (each must happen at least once): every TU size on each
// side, a step to a larger and to a smaller TU, both shift directions of the
// register array, a drain phase that empties the register array with no new
// TU behind it, a stalled input, a stalled output, the second unit left
// waiting while a TU is being transposed, the RAM form's switch from write to
// read, and all four bank rotations of the RAM form. The testbench also
// checks that the register form sustains one vector per clock on a steady
// stream of 32x32 TUs and that the RAM form takes 256 + 320 cycles per 32x32
// TU.
module tb_idct2d_tm_top;
  import idct_tm_pkg::*;
  import hevc_dct_pkg::*;

  localparam int MAX_N = 32;
  localparam int NT    = 40;
  localparam int NT_THR = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // coefficient vectors as sent and residual vectors as received, per side
  logic        src_valid [2];
  tu_size_e    src_size  [2];
  logic [15:0] src_coef  [2][MAX_N];
  logic [15:0] tm_in     [2][MAX_N];
  logic        tm_in_ready [2];
  logic        tm_out_valid [2], tm_out_ready [2], tm_out_last [2];
  tu_size_e    tm_out_size [2];
  logic [15:0] tm_out    [2][MAX_N];
  logic [15:0] res       [2][MAX_N];

  idct2d_tm_top dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .reg_in_valid (src_valid[0]),
    .reg_in_ready (tm_in_ready[0]),
    .reg_in_size  (src_size[0]),
    .reg_in_data  (tm_in[0]),
    .reg_out_valid(tm_out_valid[0]),
    .reg_out_ready(tm_out_ready[0]),
    .reg_out_size (tm_out_size[0]),
    .reg_out_last (tm_out_last[0]),
    .reg_out_data (tm_out[0]),
    .ram_in_valid (src_valid[1]),
    .ram_in_ready (tm_in_ready[1]),
    .ram_in_size  (src_size[1]),
    .ram_in_data  (tm_in[1]),
    .ram_out_valid(tm_out_valid[1]),
    .ram_out_ready(tm_out_ready[1]),
    .ram_out_size (tm_out_size[1]),
    .ram_out_last (tm_out_last[1]),
    .ram_out_data (tm_out[1])
  );

  for (genvar s = 0; s < 2; s++) begin : g_side
    idct1d_model #(.MAX_N(MAX_N), .SHIFT(7))  u_first  (.size(src_size[s]),    .in_data(src_coef[s]), .out_data(tm_in[s]));
    idct1d_model #(.MAX_N(MAX_N), .SHIFT(12)) u_second (.size(tm_out_size[s]), .in_data(tm_out[s]),   .out_data(res[s]));
  end

  // test data: coefficients and the reference residual
  int       coef  [NT][32][32];   // [TU][frequency row][frequency column]
  int       resid [NT][32][32];   // [TU][y][x]
  tu_size_e sz    [NT];

  int checks = 0, failures = 0;
  int cyc = 0;
  int stall_in = 0, stall_out = 0;
  int ot [2] = '{0, 0};
  int orow [2] = '{0, 0};
  int t_first [2] = '{-1, -1};
  int t_last [2];

  // mechanism counters
  int n_size [2][4];
  int n_up = 0, n_down = 0;
  int n_dir [2] = '{0, 0};
  int n_drain = 0;
  int n_in_stall [2] = '{0, 0};
  int n_out_stall [2] = '{0, 0};
  int n_wait [2] = '{0, 0};
  int n_wr2rd = 0;
  int n_rot [4] = '{0, 0, 0, 0};

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic void make_reference(int t);
    int n;
    int mid [32][32];
    n = int'(tu_len(sz[t]));
    // first pass down each coefficient column x: mid[y][x]
    for (int x = 0; x < n; x++) begin
      int v [32];
      for (int k = 0; k < 32; k++) v[k] = (k < n) ? coef[t][k][x] : 0;
      for (int y = 0; y < n; y++) mid[y][x] = idct_point(n, 7, y, v);
    end
    // second pass along each row y
    for (int y = 0; y < n; y++) begin
      int v [32];
      for (int k = 0; k < 32; k++) v[k] = (k < n) ? mid[y][k] : 0;
      for (int x = 0; x < n; x++) resid[t][y][x] = idct_point(n, 12, x, v);
    end
  endfunction

  // source of side s: TU t is sent as its coefficient columns
  task automatic send_tu(int s, int t);
    int n;
    n = int'(tu_len(sz[t]));
    for (int x = 0; x < n; x++) begin
      while (stall_in > 0 && $urandom_range(99) < stall_in) begin
        src_valid[s] <= 1'b0;
        if (x > 0) n_in_stall[s]++;
        @(posedge clk);
      end
      src_valid[s] <= 1'b1;
      src_size[s]  <= sz[t];
      for (int k = 0; k < MAX_N; k++) src_coef[s][k] <= (k < n) ? 16'(coef[t][k][x]) : 16'($urandom);
      @(negedge clk);
      if (t_first[s] < 0) t_first[s] = cyc;
      while (!tm_in_ready[s]) @(negedge clk);
      @(posedge clk);
    end
  endtask

  task automatic run_source(int s, int t0, int t1);
    for (int t = t0; t < t1; t++) send_tu(s, t);
    src_valid[s] <= 1'b0;
  endtask

  // sinks: residual row y of TU t arrives as one vector
  for (genvar s = 0; s < 2; s++) begin : g_sink
    initial begin
      tm_out_ready[s] = 1'b0;
      forever begin
        @(posedge clk);
        tm_out_ready[s] <= (stall_out > 0) ? ($urandom_range(99) >= stall_out) : 1'b1;
        @(negedge clk);
        if (!rst_n) continue;
        if (tm_out_valid[s] && !tm_out_ready[s]) n_out_stall[s]++;
        if (!tm_out_valid[s] && tm_out_ready[s] && ot[s] < NT && t_first[s] >= 0) n_wait[s]++;
        if (tm_out_valid[s] && tm_out_ready[s] && ot[s] < NT) begin
          int t, y, n;
          bit ok;
          t  = ot[s];
          y  = orow[s];
          n  = int'(tu_len(sz[t]));
          ok = 1'b1;
          for (int x = 0; x < MAX_N; x++)
            if (int'($signed(res[s][x])) != ((x < n) ? resid[t][y][x] : 0)) ok = 1'b0;
          check(ok, $sformatf("side %0d TU %0d (%0dx%0d) residual row %0d", s, t, n, n, y));
          check(tm_out_size[s] == sz[t] && tm_out_last[s] == (y == n - 1),
                $sformatf("side %0d TU %0d size/last", s, t));
          if (y == 0) n_size[s][sz[t]]++;
          t_last[s] = cyc;
          if (y == n - 1) begin
            orow[s] = 0;
            ot[s]++;
          end else begin
            orow[s]++;
          end
        end
      end
    end
  end

  // internal events
  logic reg_dir_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    reg_dir_q <= dut.u_reg_tm.dir_q;
    if (dut.u_reg_tm.dir_q != reg_dir_q) n_dir[dut.u_reg_tm.dir_q]++;
    if (dut.u_reg_tm.active_q && dut.u_reg_tm.nin_q == 0 && dut.u_reg_tm.cnt_q == 1) n_drain++;
    if (dut.u_ram_tm.state_q == dut.u_ram_tm.S_WRITE && dut.u_ram_tm.in_ready &&
        dut.u_ram_tm.last_line && src_valid[1]) n_wr2rd++;
    if (dut.u_ram_tm.bank_ce) n_rot[dut.u_ram_tm.rot]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      src_valid[s] = 1'b0;
      src_size[s]  = TU4;
      for (int k = 0; k < MAX_N; k++) src_coef[s][k] = '0;
    end
    for (int t = 0; t < NT; t++) begin
      int dense;
      sz[t] = (t < NT_THR) ? TU32 : tu_size_e'((t < NT_THR + 4) ? (t - NT_THR) : $urandom_range(3));
      dense = $urandom_range(3);
      for (int k = 0; k < 32; k++)
        for (int x = 0; x < 32; x++)
          coef[t][k][x] = (dense == 0 || $urandom_range(7) == 0) ? int'($urandom_range(1023)) - 512 : 0;
      make_reference(t);
    end
    sz[NT_THR + 4] = TU4;    // a step down from 32x32 to 4x4
    make_reference(NT_THR + 4);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // a steady stream of 32x32 TUs, then the rest with stalls on both sides
    fork
      run_source(0, 0, NT_THR);
      run_source(1, 0, NT_THR);
    join
    wait (ot[0] == NT_THR && ot[1] == NT_THR);
    @(posedge clk);
    check(t_last[0] - t_first[0] + 1 == (NT_THR + 1) * 32,
          $sformatf("register form: %0d cycles for %0d TUs of 32x32", t_last[0] - t_first[0] + 1, NT_THR));
    check(t_last[1] - t_first[1] + 1 == NT_THR * (256 + 320),
          $sformatf("RAM form: %0d cycles for %0d TUs of 32x32", t_last[1] - t_first[1] + 1, NT_THR));

    stall_in  = 20;
    stall_out = 20;
    fork
      run_source(0, NT_THR, NT);
      run_source(1, NT_THR, NT);
    join
    wait (ot[0] == NT && ot[1] == NT);
    repeat (2) @(posedge clk);

    for (int t = 1; t < NT; t++) begin
      if (sz[t] > sz[t-1]) n_up++;
      if (sz[t] < sz[t-1]) n_down++;
    end
    for (int s = 0; s < 2; s++) begin
      for (int z = 0; z < 4; z++)
        check(n_size[s][z] > 0, $sformatf("side %0d saw no TU of size code %0d", s, z));
      check(n_in_stall[s] > 0,  $sformatf("side %0d: no input stall", s));
      check(n_out_stall[s] > 0, $sformatf("side %0d: no output stall", s));
      check(n_wait[s] > 0,      $sformatf("side %0d: second unit never waited", s));
      check(n_dir[s] > 0,       $sformatf("register array never switched to direction %0d", s));
    end
    check(n_up > 0 && n_down > 0, "no step up or down in TU size");
    check(n_drain > 0, "no drain phase");
    check(n_wr2rd > 0, "RAM form never switched from write to read");
    for (int r = 0; r < 4; r++) check(n_rot[r] > 0, $sformatf("bank rotation %0d unused", r));
    $display("mechanisms: size steps up %0d down %0d, direction switches %0d/%0d, drain phases %0d",
             n_up, n_down, n_dir[0], n_dir[1], n_drain);
    $display("mechanisms: input stalls %0d/%0d, output stalls %0d/%0d, second unit waiting %0d/%0d cycles",
             n_in_stall[0], n_in_stall[1], n_out_stall[0], n_out_stall[1], n_wait[0], n_wait[1]);
    $display("mechanisms: RAM write-to-read %0d, bank rotations %0d %0d %0d %0d",
             n_wr2rd, n_rot[0], n_rot[1], n_rot[2], n_rot[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
