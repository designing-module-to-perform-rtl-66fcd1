// lbc_p4_updown_rot: protocol-4 of the cipher (CRY4B, up/down rotation).
//
// Column c of the matrix (1..4) belongs to key bit 4-c, and so does row r.
// With two or more key bits set, every column whose bit is 1 rotates
// vertically by one row. With at most one bit set, the rows whose bit is 0
// (all four for 0000b, three otherwise) rotate as whole rows among
// themselves, each moving to the next selected row. Clockwise moves bytes
// down (the bottom one wraps to the top), anticlockwise up, so the
// anticlockwise step undoes the clockwise one.
//
// This covers all sixteen rows of the published shuffle table; the
// downward direction for clockwise is taken from the figures for keys 0000b
// and 0011b. The table calls some two-column cases "replacing" and others
// "rotating"; this design treats all of them as vertical rotation of the
// selected columns, as the figure for 0011b (described as "replaced")
// shows. Purely combinational.
module lbc_p4_updown_rot
  import lbc_pkg::*;
(
  input  matrix_t    m_in,
  input  logic       cw,      // 1: down, 0: up
  input  logic [3:0] key,
  output matrix_t    m_out
);

  logic col_mode;
  logic [3:0] sel;   // sel[i]: row i or column i (0-based) takes part
  int         src;

  always_comb begin
    src      = 0;
    col_mode = ($countones(key) >= 2);
    for (int i = 0; i < 4; i++)
      sel[i] = col_mode ? key[3-i] : ~key[3-i];
    m_out = m_in;
    if (col_mode) begin
      for (int c = 0; c < 4; c++)
        if (sel[c])
          for (int r = 0; r < 4; r++)
            m_out[r][c] = cw ? m_in[(r + 3) % 4][c] : m_in[(r + 1) % 4][c];
    end else begin
      for (int r = 0; r < 4; r++) begin
        if (sel[r]) begin
          if (cw) src = sel[(r + 3) % 4] ? (r + 3) % 4 : (r + 2) % 4;
          else    src = sel[(r + 1) % 4] ? (r + 1) % 4 : (r + 2) % 4;
          m_out[r] = m_in[src];
        end
      end
    end
  end

endmodule
