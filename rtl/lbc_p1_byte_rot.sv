// lbc_p1_byte_rot: protocol-1 of the cipher (CRY1B, "bytes rotation").
//
// The 4x4 byte matrix is split into a left half (columns 1-2) and a right
// half (columns 3-4). Each half is a ring of eight bytes taken clockwise
// around its border: top-left, top-right, then down the right column, along
// the bottom and up the left column. A clockwise step moves every byte of
// an enabled half one place along that ring (E11 -> E12 -> E22 -> E32 ->
// E42 -> E41 -> E31 -> E21 -> E11 for the left half); an anticlockwise step
// moves it one place back, which undoes the clockwise step.
//
// en[0] (bit 0 of the nibble-key) enables the right half and en[1] the left
// half: 00 no rotation, 01 right, 10 left, 11 both. This mapping, the ring
// order and the direction follow the published rotation table, byte
// assignments and simulation snapshots. Purely combinational; the caller
// registers the result, so one VI takes one clock.
module lbc_p1_byte_rot
  import lbc_pkg::*;
(
  input  matrix_t    m_in,
  input  logic       cw,      // 1: clockwise, 0: anticlockwise
  input  logic [1:0] en,      // [0] right half, [1] left half
  output matrix_t    m_out
);

  // Ring position i of one half, clockwise, relative to its left column a:
  // (0,a) (0,a+1) (1,a+1) (2,a+1) (3,a+1) (3,a) (2,a) (1,a)
  function automatic int ring_row(int i);
    case (i)
      0, 1:    return 0;
      2, 7:    return 1;
      3, 6:    return 2;
      default: return 3;
    endcase
  endfunction

  function automatic int ring_dc(int i);
    return (i >= 1 && i <= 4) ? 1 : 0;
  endfunction

  always_comb begin
    m_out = m_in;
    for (int h = 0; h < 2; h++) begin
      // h = 0: left half (columns 0,1, en[1]); h = 1: right half (columns 2,3, en[0])
      if (en[1-h]) begin
        for (int i = 0; i < 8; i++) begin
          if (cw) m_out[ring_row(i)][2*h + ring_dc(i)] =
                    m_in[ring_row((i + 7) % 8)][2*h + ring_dc((i + 7) % 8)];
          else    m_out[ring_row(i)][2*h + ring_dc(i)] =
                    m_in[ring_row((i + 1) % 8)][2*h + ring_dc((i + 1) % 8)];
        end
      end
    end
  end

endmodule
