// tb_sram_bank: self-checking testbench of one RAM bank.
//
// Random writes and reads, with ce sometimes low, are applied for many
// cycles; a reference array in the testbench holds what the bank should
// contain. Every read must give the reference word on rdata one clock later,
// and rdata must hold its value while no read is made.
module tb_sram_bank;
  localparam int DATA_W = 16;
  localparam int DEPTH  = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     ce = 1'b0, we = 1'b0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  logic [DATA_W-1:0]        wdata = '0, rdata;
  logic [DATA_W-1:0]        mem_ref [DEPTH];
  logic [DATA_W-1:0]        exp_q;
  int checks = 0, failures = 0;

  sram_bank #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill the whole bank
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ce = 1'b1; we = 1'b1; addr = a[$clog2(DEPTH)-1:0]; wdata = DATA_W'($urandom);
      mem_ref[a] = wdata;
    end
    @(negedge clk);
    ce = 1'b1; we = 1'b0; addr = '0;
    exp_q = mem_ref[0];
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: rdata=%h expected %h", i, rdata, exp_q);
      end
      ce    = ($urandom_range(3) != 0);
      we    = 1'($urandom);
      addr  = $clog2(DEPTH)'($urandom);
      wdata = DATA_W'($urandom);
      if (ce && !we) exp_q = mem_ref[addr];
      if (ce && we) mem_ref[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
