// lbc_fdslbc: fast dynamic symmetric light block cipher module (FDSLBC).
//
// A 128-bit block is held as a 4x4 byte matrix register (E11..E44) and
// scrambled by vector instructions (VIs), each of which completes in one
// clock: the opcode presented with op_valid is decoded combinationally and
// its result is registered at the next rising edge.
//   LOD16 DD00h  matrix <= plain_bus (data memory 0100h..010Fh)
//   STO16 DD10h  cipher_we = 1 for this cycle; the data memory stores
//                cipher_bus (the matrix) at the same edge
//   LDKEY DD20h  key registers <= key_bus (data memory R1..R4)
//   HIKEY DD30h / LOWKY DD31h   select high / low nibble-keys
//   CLW   DD40h / ACLW  DD41h   select clockwise / anticlockwise
//   FLPKB DD5Bh  reverse the active nibble of key B (B = 1..4)
//   CRY1B..CRY4B DD6Bh..DD9Bh   protocols 1..4 with the active nibble of
//                key B and the current direction
// A cipher sequence and the same sequence reversed, run anticlockwise,
// restore the block, which makes the cipher symmetric. Opcodes outside this
// set (including B = 0 or 5..F) change nothing. The VI list, the matrix
// and the bus structure follow the published design; the reset state
// (matrix zero, clockwise, low nibbles) and ignoring undefined codes are
// this design's choices.
module lbc_fdslbc
  import lbc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    op_valid,
  input  opcode_t opcode,
  input  keys_t   key_bus,      // Key_R1..Key_R4 from data memory
  input  matrix_t plain_bus,    // O_bus100..O_bus10F from data memory
  output matrix_t cipher_bus,   // to I_bus100..I_bus10F of data memory
  output logic    cipher_we,    // store strobe of STO16
  output logic    clockwise,
  output logic    hi_key,
  output keys_t   keys
);

  vi_dec_t    dec;
  vi_e        vi;
  matrix_t    matrix, m_p1, m_p2, m_p3, m_p4;
  logic [3:0] nibble;

  always_comb begin
    dec = decode_vi(opcode);
    vi  = op_valid ? dec.vi : VI_NONE;
  end

  lbc_key_buffer u_keys (
    .clk, .rst_n,
    .load    (vi == VI_LDKEY),
    .key_in  (key_bus),
    .set_hi  (vi == VI_HIKEY),
    .set_lo  (vi == VI_LOWKY),
    .flip    (vi == VI_FLPK),
    .key_sel (dec.key_sel),
    .keys,
    .hi_key,
    .nibble
  );

  lbc_p1_byte_rot     u_p1 (.m_in(matrix), .cw(clockwise), .en(nibble[1:0]), .m_out(m_p1));
  lbc_p2_bit_rot      u_p2 (.m_in(matrix), .cw(clockwise), .amount(nibble), .m_out(m_p2));
  lbc_p3_byte_shuffle u_p3 (.m_in(matrix), .key(nibble),   .m_out(m_p3));
  lbc_p4_updown_rot   u_p4 (.m_in(matrix), .cw(clockwise), .key(nibble), .m_out(m_p4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      matrix    <= '0;
      clockwise <= 1'b1;
    end else begin
      case (vi)
        VI_LOD16: matrix    <= plain_bus;
        VI_CRY1:  matrix    <= m_p1;
        VI_CRY2:  matrix    <= m_p2;
        VI_CRY3:  matrix    <= m_p3;
        VI_CRY4:  matrix    <= m_p4;
        VI_CLW:   clockwise <= 1'b1;
        VI_ACLW:  clockwise <= 1'b0;
        default: ;
      endcase
    end
  end

  assign cipher_bus = matrix;
  assign cipher_we  = (vi == VI_STO16);

endmodule
