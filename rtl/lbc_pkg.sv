// lbc_pkg: types and constants shared by the light block cipher (LBC)
// extension of an AVR-class microcontroller.
//
// The cipher state is a 4x4 matrix of bytes, E11..E44. Here it is a packed
// array m[r][c] with r and c counted from 0, so m[0][0] is E11 and m[3][3]
// is E44. Cell (r,c) is mirrored at data address 0100h + 4*r + c, which is
// the row-major map the design uses for its parallel SRAM buses.
//
// The opcodes are those of the vector-instruction (VI) set: fixed codes for
// the transfer and attribute VIs, and a family code DDx0h plus a key number
// B = 1..4 in the low nibble for FLPKB and CRY1B..CRY4B. The VI-group
// encoding below (vi_e) is this design's own internal decode result.
package lbc_pkg;

  typedef logic [7:0]             byte_t;
  typedef logic [3:0][3:0][7:0]   matrix_t;   // [row][col][bit]
  typedef logic [3:0][7:0]        keys_t;     // [key 0..3 = Key_R1..Key_R4]
  typedef logic [15:0]            opcode_t;

  // Opcodes of the vector instructions
  localparam opcode_t OP_TOGGL = 16'hFFFF;
  localparam opcode_t OP_LOD16 = 16'hDD00;
  localparam opcode_t OP_STO16 = 16'hDD10;
  localparam opcode_t OP_LDKEY = 16'hDD20;
  localparam opcode_t OP_HIKEY = 16'hDD30;
  localparam opcode_t OP_LOWKY = 16'hDD31;
  localparam opcode_t OP_CLW   = 16'hDD40;
  localparam opcode_t OP_ACLW  = 16'hDD41;
  // Families: upper 12 bits; the low nibble is the key number 1..4
  localparam logic [11:0] FAM_FLPK = 12'hDD5;
  localparam logic [11:0] FAM_CRY1 = 12'hDD6;
  localparam logic [11:0] FAM_CRY2 = 12'hDD7;
  localparam logic [11:0] FAM_CRY3 = 12'hDD8;
  localparam logic [11:0] FAM_CRY4 = 12'hDD9;

  // Data-space addresses of the key registers and of the cipher block
  localparam int unsigned KEY_BASE   = 'h0001;   // R1..R4
  localparam int unsigned BLOCK_BASE = 'h0100;   // E11 .. E44 at 0100h..010Fh

  typedef enum logic [3:0] {
    VI_NONE, VI_LOD16, VI_STO16, VI_LDKEY, VI_HIKEY, VI_LOWKY,
    VI_CLW, VI_ACLW, VI_FLPK, VI_CRY1, VI_CRY2, VI_CRY3, VI_CRY4
  } vi_e;

  typedef struct packed {
    vi_e        vi;
    logic [1:0] key_sel;   // 0..3 for key B = 1..4
  } vi_dec_t;

  // Decode one opcode. Codes that are not in the VI set decode to VI_NONE
  // and leave the module's state unchanged.
  function automatic vi_dec_t decode_vi(opcode_t op);
    vi_dec_t d;
    logic    b_ok;
    d.vi      = VI_NONE;
    d.key_sel = 2'(op[3:0] - 4'd1);
    b_ok      = (op[3:0] >= 4'd1) && (op[3:0] <= 4'd4);
    unique case (op)
      OP_LOD16: d.vi = VI_LOD16;
      OP_STO16: d.vi = VI_STO16;
      OP_LDKEY: d.vi = VI_LDKEY;
      OP_HIKEY: d.vi = VI_HIKEY;
      OP_LOWKY: d.vi = VI_LOWKY;
      OP_CLW:   d.vi = VI_CLW;
      OP_ACLW:  d.vi = VI_ACLW;
      default: begin
        if (b_ok) begin
          if      (op[15:4] == FAM_FLPK) d.vi = VI_FLPK;
          else if (op[15:4] == FAM_CRY1) d.vi = VI_CRY1;
          else if (op[15:4] == FAM_CRY2) d.vi = VI_CRY2;
          else if (op[15:4] == FAM_CRY3) d.vi = VI_CRY3;
          else if (op[15:4] == FAM_CRY4) d.vi = VI_CRY4;
        end
      end
    endcase
    return d;
  endfunction

endpackage
