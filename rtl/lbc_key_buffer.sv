// lbc_key_buffer: the cipher's key registers and nibble-key selection.
//
// Holds the four key bytes Key_R1..Key_R4 and a flag that says whether the
// high or the low nibbles are active. Every cipher VI works with one
// nibble-key: the active nibble of the key its low opcode digit names.
//   load     (LDKEY)  copy the four key bytes from the data-memory key bus
//   set_hi   (HIKEY)  make the high nibbles active
//   set_lo   (LOWKY)  make the low nibbles active
//   flip     (FLPKB)  reverse the bit order of the active nibble of key
//                     key_sel, in place (0111b becomes 1110b)
// All updates take effect at the rising clock edge, one VI per clock; the
// flipped key stays until the next flip or load. `nibble` is combinational
// from the registers and key_sel. The operations follow the published VI
// list; the reset values (keys zero, low nibbles active) are this design's
// choice.
module lbc_key_buffer
  import lbc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  keys_t      key_in,
  input  logic       set_hi,
  input  logic       set_lo,
  input  logic       flip,
  input  logic [1:0] key_sel,   // 0..3 for Key_R1..Key_R4
  output keys_t      keys,
  output logic       hi_key,
  output logic [3:0] nibble
);

  function automatic logic [3:0] reverse4(logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      keys   <= '0;
      hi_key <= 1'b0;
    end else begin
      if (load) keys <= key_in;
      else if (flip) begin
        if (hi_key) keys[key_sel][7:4] <= reverse4(keys[key_sel][7:4]);
        else        keys[key_sel][3:0] <= reverse4(keys[key_sel][3:0]);
      end
      if (set_hi)      hi_key <= 1'b1;
      else if (set_lo) hi_key <= 1'b0;
    end
  end

  assign nibble = hi_key ? keys[key_sel][7:4] : keys[key_sel][3:0];

endmodule
