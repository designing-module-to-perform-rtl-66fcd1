// tb_lbc_fdslbc: runs the published encryption and decryption sequences
// (13 vector instructions each, keys E3h and 71h, block 11h..44h) directly
// on the cipher module and compares the matrix after every instruction
// with the published simulation snapshots. Each instruction is given for
// exactly one clock, so the checks also confirm the one-VI-per-clock
// timing. Also checked: the STO16 strobe, the direction and nibble flags,
// and that an invalid cycle or an undefined opcode changes nothing.
module tb_lbc_fdslbc;
  import lbc_pkg::*;
  import tb_lbc_util_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic op_valid = 0;
  opcode_t opcode = '0;
  keys_t key_bus = '0, keys;
  matrix_t plain_bus = '0, cipher_bus;
  logic cipher_we, clockwise, hi_key;

  lbc_fdslbc dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    opcode_t      op;
    logic         chk;
    logic [127:0] exp;
  } step_t;

  localparam logic [127:0] PLAIN  = 128'h11_12_13_14_21_22_23_24_31_32_33_34_41_42_43_44;
  localparam logic [127:0] CIPHER = 128'h90_89_92_0A_98_88_19_9A_20_33_22_22_21_23_12_21;

  step_t enc [13] = '{
    '{16'hDD00, 1, PLAIN},
    '{16'hDD20, 0, '0},
    '{16'hDD31, 0, '0},
    '{16'hDD40, 0, '0},
    '{16'hDD91, 1, 128'h11_12_43_44_21_22_13_14_31_32_23_24_41_42_33_34},
    '{16'hDD61, 1, 128'h21_11_13_43_31_12_23_44_41_22_33_14_42_32_34_24},
    '{16'hDD82, 1, 128'h21_11_13_24_31_12_23_44_41_22_33_14_42_32_34_43},
    '{16'hDD72, 1, 128'h90_88_89_92_98_12_23_22_20_22_33_0A_21_19_9A_21},
    '{16'hDD30, 0, '0},
    '{16'hDD92, 1, 128'h90_19_9A_21_98_88_89_92_20_12_23_22_21_22_33_0A},
    '{16'hDD51, 0, '0},
    '{16'hDD81, 1, CIPHER},
    '{16'hDD10, 1, CIPHER}
  };
  step_t dec [13] = '{
    '{16'hDD00, 1, CIPHER},
    '{16'hDD20, 0, '0},
    '{16'hDD41, 0, '0},
    '{16'hDD30, 0, '0},
    '{16'hDD51, 0, '0},
    '{16'hDD81, 1, 128'h90_19_9A_21_98_88_89_92_20_12_23_22_21_22_33_0A},
    '{16'hDD92, 1, 128'h90_88_89_92_98_12_23_22_20_22_33_0A_21_19_9A_21},
    '{16'hDD31, 0, '0},
    '{16'hDD72, 1, 128'h21_11_13_24_31_12_23_44_41_22_33_14_42_32_34_43},
    '{16'hDD82, 1, 128'h21_11_13_43_31_12_23_44_41_22_33_14_42_32_34_24},
    '{16'hDD61, 1, 128'h11_12_43_44_21_22_13_14_31_32_23_24_41_42_33_34},
    '{16'hDD91, 1, PLAIN},
    '{16'hDD10, 1, PLAIN}
  };

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // present one opcode for one clock; check the STO16 strobe on the way
  task automatic vi(opcode_t op, logic valid = 1);
    op_valid = valid; opcode = op;
    #1 expect_eq($sformatf("cipher_we %h", op), 128'(cipher_we), 128'(valid && op == 16'hDD10));
    @(posedge clk); #1;
    op_valid = 0; opcode = 16'h0000;
  endtask

  task automatic run(string name, step_t s[13]);
    for (int i = 0; i < 13; i++) begin
      vi(s[i].op);
      if (s[i].chk)
        expect_eq($sformatf("%s step %0d (%h)", name, i + 1, s[i].op), 128'(cipher_bus), 128'(mk(s[i].exp)));
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_eq("reset clockwise", 128'(clockwise), 1);
    key_bus = {8'h00, 8'h00, 8'h71, 8'hE3};
    plain_bus = mk(PLAIN);
    run("enc", enc);
    expect_eq("enc keys", 128'(keys), 128'h0000_71_73);
    expect_eq("enc flags", 128'({clockwise, hi_key}), 128'h3);
    plain_bus = mk(CIPHER);
    run("dec", dec);
    expect_eq("dec flags", 128'({clockwise, hi_key}), 128'h0);
    // nothing happens without op_valid, for undefined codes or key 0 / 5
    vi(16'hDD91, 0);  expect_eq("not valid", 128'(cipher_bus), 128'(mk(PLAIN)));
    vi(16'hDD95);     expect_eq("key 5", 128'(cipher_bus), 128'(mk(PLAIN)));
    vi(16'hDD60);     expect_eq("key 0", 128'(cipher_bus), 128'(mk(PLAIN)));
    vi(16'hDDA1);     expect_eq("undefined", 128'(cipher_bus), 128'(mk(PLAIN)));
    vi(16'hDD42);     expect_eq("undefined dir", 128'(clockwise), 0);
    vi(16'hDD40);     expect_eq("CLW", 128'(clockwise), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
