// rc6_rotl: W-bit rotate left by the low log2(W) bits of `amount`, the
// data-dependent rotation of RC6. Combinational barrel rotator.
module rc6_rotl #(
  parameter int W = 16
) (
  input  logic [W-1:0] din,
  input  logic [W-1:0] amount,
  output logic [W-1:0] dout
);

  localparam int LGW = $clog2(W);

  logic [2*W-1:0] dbl;
  logic [LGW-1:0] sh;

  always_comb begin
    sh   = amount[LGW-1:0];
    dbl  = {din, din} << sh;
    dout = dbl[2*W-1 -: W];
  end

endmodule
