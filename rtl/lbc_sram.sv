// lbc_sram: AVR-style data memory with the cipher module's extra buses.
//
// One byte array covers the whole data space from address 0000h: the
// general-purpose registers at 0000h..001Fh, I/O at 0020h..00FFh and RAM
// from 0100h. Besides the conventional 8-bit port it has
//   key_bus     four read buses from R1..R4 (0001h..0004h)
//   plain_bus   sixteen read buses O_bus100..O_bus10F from 0100h..010Fh,
//               byte (r,c) of the matrix from 0100h + 4r + c
//   cipher_bus  sixteen write buses I_bus100..I_bus10F to the same bytes,
//               all written at one rising edge when block_we is high
// so a 16-byte block or the four keys move in a single cycle. Reads are
// combinational; writes take place at the rising clock edge. If a
// conventional write and a block write hit the same byte in one cycle the
// block write wins. The memory is not reset. The extra buses and their
// addresses follow the published design; the conventional port's timing,
// the write priority and the default size (2304 bytes, the data space of a
// common 2 KiB AVR) are this design's choices.
module lbc_sram
  import lbc_pkg::*;
#(
  parameter int unsigned DEPTH = 2304     // bytes of data space, > 010Fh
) (
  input  logic        clk,
  // conventional 8-bit port
  input  logic [15:0] addr,
  input  logic        we,
  input  byte_t       wdata,
  output byte_t       rdata,
  // cipher module buses
  output keys_t       key_bus,
  output matrix_t     plain_bus,
  input  matrix_t     cipher_bus,
  input  logic        block_we
);

  localparam int unsigned AW = $clog2(DEPTH);

  byte_t mem [DEPTH];

  initial assert (DEPTH > BLOCK_BASE + 16) else $fatal(1, "DEPTH too small");

  always_ff @(posedge clk) begin
    if (we && (32'(addr) < DEPTH)) mem[AW'(addr)] <= wdata;
    if (block_we)
      for (int i = 0; i < 16; i++)
        mem[BLOCK_BASE + i] <= cipher_bus[i / 4][i % 4];
  end

  assign rdata = (32'(addr) < DEPTH) ? mem[AW'(addr)] : 8'h00;

  always_comb begin
    for (int k = 0; k < 4; k++) key_bus[k] = mem[KEY_BASE + k];
    for (int i = 0; i < 16; i++) plain_bus[i / 4][i % 4] = mem[BLOCK_BASE + i];
  end

endmodule
