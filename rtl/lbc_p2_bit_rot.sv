// lbc_p2_bit_rot: protocol-2 of the cipher (CRY2B, "bits rotation").
//
// The twelve outer bytes of the 4x4 matrix are concatenated into a 96-bit
// ring, E11 in the most significant byte, then E12, E13, E14, E24, E34,
// E44, E43, E42, E41, E31 and E21 in the least significant byte. Clockwise
// the ring is rotated right, anticlockwise left, by the value of the
// selected nibble-key (0..15 bits). The four inner bytes E22, E23, E32 and
// E33 pass unchanged. The ring order and the right/left directions follow
// the published description; rotating by the nibble value in one step
// (rather than by one bit) is read from the statement that the nibble gives
// the number of shifted bits, and is confirmed by the simulation snapshot
// for a nibble of 1. Purely combinational: a barrel rotator.
module lbc_p2_bit_rot
  import lbc_pkg::*;
(
  input  matrix_t    m_in,
  input  logic       cw,      // 1: rotate right, 0: rotate left
  input  logic [3:0] amount,  // number of bit positions
  output matrix_t    m_out
);

  logic [95:0]  ring, rotated;
  logic [191:0] twice;

  always_comb begin
    ring = {m_in[0][0], m_in[0][1], m_in[0][2], m_in[0][3],
            m_in[1][3], m_in[2][3], m_in[3][3], m_in[3][2],
            m_in[3][1], m_in[3][0], m_in[2][0], m_in[1][0]};
    twice = {ring, ring};
    if (cw) rotated = twice[int'(amount) +: 96];            // rotate right
    else    rotated = twice[96 - int'(amount) +: 96];       // rotate left
    m_out = m_in;
    {m_out[0][0], m_out[0][1], m_out[0][2], m_out[0][3],
     m_out[1][3], m_out[2][3], m_out[3][3], m_out[3][2],
     m_out[3][1], m_out[3][0], m_out[2][0], m_out[1][0]} = rotated;
  end

endmodule
