// tb_tm_cell: self-checking testbench of the single-point transpose cell.
//
// Random values drive all inputs for many cycles. A reference register in
// the testbench follows the rule the cell must obey (hold when en is low,
// else take ext on load_ext, else the right neighbour when dir is 1 and the
// one below when dir is 0), and q is compared with it after every clock. The
// cell's output must change on the clock edge after its inputs, not before.
module tb_tm_cell;
  localparam int DATA_W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              en = 1'b1, dir = 1'b0, load_ext = 1'b1;
  logic [DATA_W-1:0] ext = '0, from_right = '0, from_below = '0, q;
  logic [DATA_W-1:0] ref_q;
  int checks = 0, failures = 0;

  tm_cell #(.DATA_W(DATA_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load a known value first
    @(posedge clk);
    ref_q = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en         = ($urandom_range(3) != 0);
      dir        = 1'($urandom);
      load_ext   = ($urandom_range(3) == 0);
      ext        = DATA_W'($urandom);
      from_right = DATA_W'($urandom);
      from_below = DATA_W'($urandom);
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL: q changed before the clock edge");
      end
      if (en) ref_q = load_ext ? ext : (dir ? from_right : from_below);
      @(posedge clk);
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
