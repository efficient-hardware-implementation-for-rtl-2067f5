// rc6_inv_round: one RC6 decryption round, the inverse of rc6_round.
//
//   (A, B, C, D) = (D, A, B, C)
//   u = (D * (2D + 1)) <<< log2(W)      t = (B * (2B + 1)) <<< log2(W)
//   C = ((C - S[2i+1]) >>> t) ^ u       A = ((A - S[2i]) >>> u) ^ t
//
// A right rotation by n is done as a left rotation by -n (mod W).
// Combinational; the decryptor registers the outputs once per clock.
module rc6_inv_round #(
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

  // Words after undoing the (A, B, C, D) = (B, C, D, A) rotation.
  logic [W-1:0] a0, b0, c0, d0;
  logic [W-1:0] product1, product2, t, u, a_rot, c_rot;

  assign a0 = d_in;
  assign b0 = a_in;
  assign c0 = b_in;
  assign d0 = c_in;

  assign product1 = W'(b0 * ((b0 << 1) + W'(1)));
  assign product2 = W'(d0 * ((d0 << 1) + W'(1)));

  rc6_rotl #(.W(W)) u_rot_t (.din(product1), .amount(W'(LGW)), .dout(t));
  rc6_rotl #(.W(W)) u_rot_u (.din(product2), .amount(W'(LGW)), .dout(u));
  rc6_rotl #(.W(W)) u_rot_c (.din(c0 - s_odd), .amount(-t), .dout(c_rot));
  rc6_rotl #(.W(W)) u_rot_a (.din(a0 - s_even), .amount(-u), .dout(a_rot));

  assign a_out = a_rot ^ t;
  assign b_out = b0;
  assign c_out = c_rot ^ u;
  assign d_out = d0;

endmodule
