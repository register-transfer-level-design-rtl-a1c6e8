// tb_agm: self-checking testbench of the address generator.
//
// For every row write and every column read of a 32x32 TU the testbench
// follows each of the four banks: the (row, column) sample that bank b is
// told to store or give for that lane must be the one the transfer moves,
// and each sample of the TU must land in exactly one (bank, word) place,
// with no two samples sharing a place. The column read must find every
// sample at the place where the row write put it.
module tb_agm;
  localparam int MAX_N = 32;
  localparam int BANKS = 4;
  localparam int STR   = MAX_N / BANKS;

  logic                         wr;
  logic [$clog2(MAX_N)-1:0]     line;
  logic [$clog2(MAX_N/BANKS)-1:0] chunk;
  logic [$clog2(MAX_N*MAX_N/BANKS)-1:0] bank_addr [BANKS];
  logic [$clog2(BANKS)-1:0]     rot;

  agm #(.MAX_N(MAX_N), .BANKS(BANKS)) dut (.*);

  int checks = 0, failures = 0;
  int place_r [BANKS][MAX_N*MAX_N/BANKS];  // sample stored at each place
  int place_c [BANKS][MAX_N*MAX_N/BANKS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < BANKS; b++)
      for (int a = 0; a < MAX_N * MAX_N / BANKS; a++) place_r[b][a] = -1;
    // row writes: lane c of row r goes to bank (rot-aligned) b
    for (int r = 0; r < MAX_N; r++)
      for (int k = 0; k < MAX_N / BANKS; k++) begin
        wr = 1'b1; line = r[$clog2(MAX_N)-1:0]; chunk = k[$clog2(MAX_N/BANKS)-1:0];
        #1;
        check(rot == r % BANKS, "write rotation");
        for (int b = 0; b < BANKS; b++) begin
          int c, a;
          c = k * BANKS + (b - int'(rot) + BANKS) % BANKS;   // lane bank b receives
          a = int'(bank_addr[b]);
          check(place_r[b][a] == -1, $sformatf("place %0d/%0d written twice", b, a));
          place_r[b][a] = r;
          place_c[b][a] = c;
        end
      end
    // column reads: lane r of column c must come from the place holding (r, c)
    for (int c = 0; c < MAX_N; c++)
      for (int k = 0; k < MAX_N / BANKS; k++) begin
        wr = 1'b0; line = c[$clog2(MAX_N)-1:0]; chunk = k[$clog2(MAX_N/BANKS)-1:0];
        #1;
        check(rot == c % BANKS, "read rotation");
        for (int m = 0; m < BANKS; m++) begin
          int b, a;
          b = (m + int'(rot)) % BANKS;                        // bank feeding lane m
          a = int'(bank_addr[b]);
          check(place_r[b][a] == k * BANKS + m && place_c[b][a] == c,
                $sformatf("column %0d lane %0d read (%0d,%0d)", c, k * BANKS + m,
                          place_r[b][a], place_c[b][a]));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
