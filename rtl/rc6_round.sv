// rc6_round: one RC6 encryption round, combinational.
//
//   t = (B * (2B + 1)) <<< log2(W)      u = (D * (2D + 1)) <<< log2(W)
//   A = ((A ^ t) <<< u) + S[2i]         C = ((C ^ u) <<< t) + S[2i+1]
//   (A, B, C, D) = (B, C, D, A)
//
// <<< is a rotation; products and sums are modulo 2^W. The two quadratic
// products (product1/product2) and the two data-dependent rotations are the
// critical path. The encryptor registers the outputs once per clock.
module rc6_round #(
  parameter int W = 16
) (
  input  logic [W-1:0] a_in,
  input  logic [W-1:0] b_in,
  input  logic [W-1:0] c_in,
  input  logic [W-1:0] d_in,
  input  logic [W-1:0] s_even,   // S[2i]
  input  logic [W-1:0] s_odd,    // S[2i+1]
  output logic [W-1:0] a_out,
  output logic [W-1:0] b_out,
  output logic [W-1:0] c_out,
  output logic [W-1:0] d_out
);

  localparam int LGW = $clog2(W);

  logic [W-1:0] product1, product2, t, u, a_rot, c_rot;

  assign product1 = W'(b_in * ((b_in << 1) + W'(1)));
  assign product2 = W'(d_in * ((d_in << 1) + W'(1)));

  rc6_rotl #(.W(W)) u_rot_t (.din(product1), .amount(W'(LGW)), .dout(t));
  rc6_rotl #(.W(W)) u_rot_u (.din(product2), .amount(W'(LGW)), .dout(u));
  rc6_rotl #(.W(W)) u_rot_a (.din(a_in ^ t), .amount(u), .dout(a_rot));
  rc6_rotl #(.W(W)) u_rot_c (.din(c_in ^ u), .amount(t), .dout(c_rot));

  assign a_out = b_in;
  assign b_out = c_rot + s_odd;
  assign c_out = d_in;
  assign d_out = a_rot + s_even;

endmodule
