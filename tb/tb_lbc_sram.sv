// tb_lbc_sram: checks the data memory with parallel buses. The
// conventional port writes and reads bytes; the key bus shows R1..R4
// (0001h..0004h); the plain bus shows 0100h..010Fh row by row (E11 at
// 0100h, E44 at 010Fh); a block write stores all sixteen bytes in one clock
// and wins over a conventional write to the same byte.
module tb_lbc_sram;
  import lbc_pkg::*;
  import tb_lbc_util_pkg::*;

  localparam int unsigned DEPTH = 2304;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic [15:0] addr = '0;
  logic we = 0, block_we = 0;
  byte_t wdata = '0, rdata;
  keys_t key_bus;
  matrix_t plain_bus, cipher_bus = '0;
  byte_t model [DEPTH];

  lbc_sram dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic wr(logic [15:0] a, byte_t d);
    addr = a; wdata = d; we = 1;
    @(posedge clk); #1;
    we = 0;
    if (32'(a) < DEPTH) model[int'(a)] = d;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise everything through the conventional port
    for (int a = 0; a < DEPTH; a++) wr(16'(a), 8'($urandom));
    wr(16'h0001, 8'hE3); wr(16'h0002, 8'h71); wr(16'h0003, 8'h5A); wr(16'h0004, 8'hC6);
    expect_eq("key bus", 128'(key_bus), 128'hC6_5A_71_E3);
    for (int i = 0; i < 16; i++) wr(16'h0100 + 16'(i), 8'((i / 4 + 1) * 16 + i % 4 + 1));
    expect_eq("plain bus", 128'(plain_bus), 128'(labels()));
    addr = 16'h0106; #1;
    expect_eq("read E23", 128'(rdata), 128'h23);
    // block write with a colliding conventional write
    cipher_bus = rand_matrix();
    addr = 16'h0105; wdata = 8'hAA; we = 1; block_we = 1;
    @(posedge clk); #1;
    we = 0; block_we = 0;
    for (int i = 0; i < 16; i++) model['h100 + i] = cipher_bus[i / 4][i % 4];
    expect_eq("block write", 128'(plain_bus), 128'(cipher_bus));
    for (int i = 0; i < 16; i++) begin
      addr = 16'h0100 + 16'(i); #1;
      expect_eq("block byte", 128'(rdata), 128'(cipher_bus[i / 4][i % 4]));
    end
    // random conventional traffic
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] a;
      a = 16'($urandom % DEPTH);
      if ($urandom % 2 == 1) wr(a, 8'($urandom));
      addr = a; #1;
      expect_eq("random read", 128'(rdata), 128'(model[int'(a)]));
    end
    addr = 16'hFFFF; #1;
    expect_eq("out of range read", 128'(rdata), 128'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
