// lbc_p3_byte_shuffle: protocol-3 of the cipher (CRY3B, "bytes shuffling").
//
// The sixteen bytes form eight fixed pairs; an enabled pair swaps its two
// bytes. Column 1 of the matrix belongs to key bit 3 and column 4 to key
// bit 0. A pair whose bytes lie in one column is enabled by that column's
// bit; a pair spanning two columns needs both columns' bits:
//   E11<->E22  bits 3,2      E21<->E41  bit 3
//   E12<->E23  bits 2,1      E31<->E34  bits 3,0
//   E13<->E24  bits 1,0      E32<->E43  bits 2,1
//   E14<->E44  bit 0         E33<->E42  bits 2,1
// The pairs are those drawn for an all-ones key; the enabling rule is this
// design's reading of the published key = 1001b example, the E31<->E34
// condition and the simulation snapshots for keys 0001b and 0111b, all of
// which it reproduces. Every pair is disjoint, so the step is its own
// inverse and needs no direction. Purely combinational.
module lbc_p3_byte_shuffle
  import lbc_pkg::*;
(
  input  matrix_t    m_in,
  input  logic [3:0] key,
  output matrix_t    m_out
);

  typedef struct packed {
    logic [1:0] ra, ca, rb, cb;
    logic [3:0] need;           // key bits that must all be 1
  } pair_t;

  localparam pair_t PAIRS [8] = '{
    '{2'd0, 2'd0, 2'd1, 2'd1, 4'b1100},
    '{2'd0, 2'd1, 2'd1, 2'd2, 4'b0110},
    '{2'd0, 2'd2, 2'd1, 2'd3, 4'b0011},
    '{2'd0, 2'd3, 2'd3, 2'd3, 4'b0001},
    '{2'd1, 2'd0, 2'd3, 2'd0, 4'b1000},
    '{2'd2, 2'd0, 2'd2, 2'd3, 4'b1001},
    '{2'd2, 2'd1, 2'd3, 2'd2, 4'b0110},
    '{2'd2, 2'd2, 2'd3, 2'd1, 4'b0110}
  };

  always_comb begin
    m_out = m_in;
    for (int p = 0; p < 8; p++) begin
      if ((key & PAIRS[p].need) == PAIRS[p].need) begin
        m_out[PAIRS[p].ra][PAIRS[p].ca] = m_in[PAIRS[p].rb][PAIRS[p].cb];
        m_out[PAIRS[p].rb][PAIRS[p].cb] = m_in[PAIRS[p].ra][PAIRS[p].ca];
      end
    end
  end

endmodule
