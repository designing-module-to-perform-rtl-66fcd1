// lbc_avr_top: the cipher extension of an AVR-class microcontroller.
//
// Joins the instruction toggling switch (lbc_its), the cipher module
// (lbc_fdslbc) and the data memory with its parallel buses (lbc_sram). The
// core itself stays outside: it presents each fetched 16-bit opcode on
// instr (with instr_valid), receives the opcodes meant for its own decoder
// on id_opcode, and uses the conventional 8-bit data-memory port. After
// TOGGL (FFFFh) the following opcodes go to the cipher module until the
// next TOGGL. Every vector instruction takes one clock: LOD16 and LDKEY
// read the block at 0100h..010Fh and the keys at R1..R4 in one cycle, STO16
// writes the block back in one cycle. This arrangement follows the
// published block diagram; the port list is this design's own.
module lbc_avr_top
  import lbc_pkg::*;
#(
  parameter int unsigned DEPTH = 2304
) (
  input  logic        clk,
  input  logic        rst_n,
  // opcode stream from the core's instruction register
  input  logic        instr_valid,
  input  logic [15:0] instr,
  // opcodes forwarded to the core's instruction decoder
  output logic        id_valid,
  output logic [15:0] id_opcode,
  output logic        lbc_mode,
  // cipher module state, for status and debug
  output logic        lbc_clockwise,
  output logic        lbc_hi_key,
  output logic [31:0] lbc_keys,      // Key_R4 .. Key_R1, R1 in bits 7:0
  // conventional data-memory port of the core
  input  logic [15:0] mem_addr,
  input  logic        mem_we,
  input  logic [7:0]  mem_wdata,
  output logic [7:0]  mem_rdata
);

  logic    lbc_valid;
  opcode_t lbc_opcode;
  keys_t   key_bus;
  matrix_t plain_bus, cipher_bus;
  logic    cipher_we;

  lbc_its u_its (
    .clk, .rst_n, .instr_valid, .instr,
    .id_valid, .id_opcode, .lbc_valid, .lbc_opcode, .lbc_mode
  );

  lbc_fdslbc u_fdslbc (
    .clk, .rst_n,
    .op_valid (lbc_valid),
    .opcode   (lbc_opcode),
    .key_bus, .plain_bus, .cipher_bus, .cipher_we,
    .clockwise (lbc_clockwise), .hi_key (lbc_hi_key), .keys (lbc_keys)
  );

  lbc_sram #(.DEPTH(DEPTH)) u_sram (
    .clk,
    .addr (mem_addr), .we (mem_we), .wdata (mem_wdata), .rdata (mem_rdata),
    .key_bus, .plain_bus, .cipher_bus,
    .block_we (cipher_we)
  );

endmodule
