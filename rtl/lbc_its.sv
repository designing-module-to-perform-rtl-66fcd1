// lbc_its: instruction toggling switch (ITS).
//
// Sits between the instruction register and the instruction decoder of an
// AVR-class core and routes each 16-bit opcode either to that decoder or to
// the cipher module. The otherwise unused opcode FFFFh (TOGGL) flips the
// route; it is consumed by the switch and reaches neither side. After reset
// opcodes go to the conventional decoder.
//
// Routing is combinational from the current route flag; the flag flips at
// the rising edge that ends a cycle carrying FFFFh, so the opcode right
// after TOGGL already takes the new path. The side not selected sees
// valid = 0 and opcode 0000h, which is the AVR's NOP. The toggle code, the
// two 16-bit output buses and the reset route follow the published design;
// the valid strobes and the NOP fill are this design's choices.
module lbc_its
  import lbc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    instr_valid,
  input  opcode_t instr,
  output logic    id_valid,     // to the conventional instruction decoder
  output opcode_t id_opcode,
  output logic    lbc_valid,    // to the cipher module
  output opcode_t lbc_opcode,
  output logic    lbc_mode      // 1: opcodes currently go to the cipher module
);

  logic toggle;

  assign toggle = instr_valid && (instr == OP_TOGGL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      lbc_mode <= 1'b0;
    else if (toggle) lbc_mode <= ~lbc_mode;
  end

  always_comb begin
    id_valid   = instr_valid && !toggle && !lbc_mode;
    lbc_valid  = instr_valid && !toggle &&  lbc_mode;
    id_opcode  = id_valid  ? instr : 16'h0000;
    lbc_opcode = lbc_valid ? instr : 16'h0000;
  end

endmodule
