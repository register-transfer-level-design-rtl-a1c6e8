// idct1d_model: behavioural model of one 1-D IDCT unit of the HEVC 2-D
// inverse transform, used by testbenches in place of the real pipelined unit.
//
// The model is combinational with no latency: out_data lanes 0 to N-1 are the
// N-point HEVC inverse core transform of in_data lanes 0 to N-1, rounded and
// shifted right by SHIFT and clipped to 16 bits; lanes N and above are zero.
// N is given by the TU size code. It only computes the arithmetic of the unit,
// not its pipeline or timing.
module idct1d_model
  import idct_tm_pkg::*;
  import hevc_dct_pkg::*;
#(
  parameter int MAX_N = 32,
  parameter int SHIFT = 7
) (
  input  tu_size_e    size,
  input  logic [15:0] in_data  [MAX_N],
  output logic [15:0] out_data [MAX_N]
);

  always_comb begin
    int vin [32];
    int n;
    n = int'(tu_len(size));
    for (int k = 0; k < 32; k++) vin[k] = (k < MAX_N && k < n) ? int'($signed(in_data[k])) : 0;
    for (int p = 0; p < MAX_N; p++)
      out_data[p] = (p < n) ? 16'(idct_point(n, SHIFT, p, vin)) : 16'd0;
  end

endmodule
