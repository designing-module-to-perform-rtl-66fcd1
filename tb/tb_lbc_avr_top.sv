// tb_lbc_avr_top: end-to-end test of the cipher extension at its default
// size. The testbench plays the AVR core: it writes the block and the keys
// through the conventional 8-bit data port, streams opcodes (ordinary AVR
// opcodes, TOGGL, vector instructions) one per clock into the toggling
// switch, and reads the result back through the data port.
//   1. The published encryption sequence on block 11h..44h with keys E3h
//      and 71h; the matrix is compared with the published snapshot after
//      every instruction, and the stored block with the published
//      ciphertext.
//   2. The published decryption sequence, which must restore the block.
//   3. Random round trips: random keys and block, a random sequence of
//      cipher steps with clockwise rotation, then the mirrored sequence
//      with anticlockwise rotation, which must restore the block.
// Every mechanism (route toggle, each vector instruction, both directions,
// both nibble selections, forwarding to the core's decoder) is counted and
// must occur at least once.
module tb_lbc_avr_top;
  import lbc_pkg::*;
  import tb_lbc_util_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0;
  logic [15:0] instr = '0;
  logic id_valid, lbc_mode, lbc_clockwise, lbc_hi_key;
  logic [15:0] id_opcode;
  logic [31:0] lbc_keys;
  logic [15:0] mem_addr = '0;
  logic mem_we = 0;
  logic [7:0] mem_wdata = '0, mem_rdata;

  lbc_avr_top dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- counters
  int n_vi [vi_e];
  int n_toggle = 0, n_id = 0, n_cw_cry = 0, n_acw_cry = 0, n_hi_cry = 0, n_lo_cry = 0;
  int cycles_in_lbc = 0;

  always @(posedge clk) if (rst_n) begin
    vi_dec_t d;
    d = decode_vi(dut.u_its.lbc_opcode);
    if (instr_valid && instr == 16'hFFFF) n_toggle++;
    if (id_valid) n_id++;
    if (dut.u_its.lbc_valid) begin
      cycles_in_lbc++;
      n_vi[d.vi]++;
      if (d.vi inside {VI_CRY1, VI_CRY2, VI_CRY4}) begin
        if (lbc_clockwise) n_cw_cry++; else n_acw_cry++;
      end
      if (d.vi inside {VI_CRY1, VI_CRY2, VI_CRY3, VI_CRY4}) begin
        if (lbc_hi_key) n_hi_cry++; else n_lo_cry++;
      end
    end
  end

  // ---------------------------------------------------------------- helpers
  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic op(logic [15:0] code);
    instr_valid = 1; instr = code;
    @(posedge clk); #1;
    instr_valid = 0; instr = '0;
  endtask

  task automatic mem_write(logic [15:0] a, logic [7:0] d);
    mem_addr = a; mem_wdata = d; mem_we = 1;
    @(posedge clk); #1;
    mem_we = 0;
  endtask

  task automatic write_block(matrix_t m);
    for (int i = 0; i < 16; i++) mem_write(16'h0100 + 16'(i), m[i / 4][i % 4]);
  endtask

  task automatic read_block_port(output matrix_t m);
    for (int i = 0; i < 16; i++) begin
      mem_addr = 16'h0100 + 16'(i); #1;
      m[i / 4][i % 4] = mem_rdata;
    end
  endtask

  // ---------------------------------------------------------------- scenario
  localparam logic [127:0] PLAIN  = 128'h11_12_13_14_21_22_23_24_31_32_33_34_41_42_43_44;
  localparam logic [127:0] CIPHER = 128'h90_89_92_0A_98_88_19_9A_20_33_22_22_21_23_12_21;

  typedef struct { logic [15:0] op; logic chk; logic [127:0] exp; } step_t;

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
    '{16'hDD10, 0, '0}
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
    '{16'hDD10, 0, '0}
  };

  task automatic run_published(string name, step_t s[13], logic [127:0] stored);
    matrix_t got;
    int c0;
    op(16'h0C01);                                  // an ordinary AVR opcode
    expect_eq({name, " core opcode forwarded"}, 128'(lbc_mode), 0);
    op(16'hFFFF);
    expect_eq({name, " toggled to cipher"}, 128'(lbc_mode), 1);
    c0 = cycles_in_lbc;
    for (int i = 0; i < 13; i++) begin
      instr_valid = 1; instr = s[i].op; #1;
      expect_eq($sformatf("%s decoder idle during %h", name, s[i].op),
                128'({id_valid, id_opcode}), 128'h0);
      @(posedge clk); #1;
      instr_valid = 0;
      if (s[i].chk)
        expect_eq($sformatf("%s step %0d (%h)", name, i + 1, s[i].op),
                  128'(dut.u_fdslbc.cipher_bus), 128'(mk(s[i].exp)));
    end
    // one VI per clock: 13 VIs, 13 cycles in the cipher unit
    expect_eq({name, " cycles for 13 VIs"}, 128'(cycles_in_lbc - c0), 128'd13);
    op(16'hFFFF);
    expect_eq({name, " toggled back"}, 128'(lbc_mode), 0);
    read_block_port(got);
    expect_eq({name, " stored block"}, 128'(got), 128'(mk(stored)));
  endtask

  // ---------------------------------------------------------------- random
  typedef struct { logic hi; logic [3:0] fam; logic [3:0] b; } rstep_t;

  task automatic issue(rstep_t st);
    op(st.hi ? 16'hDD30 : 16'hDD31);
    op({8'hDD, st.fam, st.b});
  endtask

  task automatic round_trip(int n);
    matrix_t plain, cipher, back;
    rstep_t steps[$];
    plain = rand_matrix();
    write_block(plain);
    for (int k = 1; k <= 4; k++) mem_write(16'(k), 8'($urandom));
    for (int i = 0; i < n; i++) begin
      rstep_t st;
      st.hi  = 1'($urandom);
      st.fam = 4'(5 + $urandom % 5);               // FLPK, CRY1..CRY4
      st.b   = 4'(1 + $urandom % 4);
      steps.push_back(st);
    end
    // encryption
    op(16'hFFFF);
    op(16'hDD00); op(16'hDD20); op(16'hDD40);
    foreach (steps[i]) issue(steps[i]);
    op(16'hDD10);
    op(16'hFFFF);
    read_block_port(cipher);
    // decryption: reload, bring the keys to their final state, reverse
    op(16'hFFFF);
    op(16'hDD00); op(16'hDD20);
    foreach (steps[i]) if (steps[i].fam == 4'h5) issue(steps[i]);
    op(16'hDD41);
    for (int i = steps.size() - 1; i >= 0; i--) issue(steps[i]);
    op(16'hDD10);
    op(16'hFFFF);
    read_block_port(back);
    expect_eq("round trip restores block", 128'(back), 128'(plain));
    if (cipher == plain) $display("note: sequence left the block unchanged");
    op(16'h9508);                                 // an ordinary AVR opcode between runs
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    write_block(mk(PLAIN));
    mem_write(16'h0001, 8'hE3);
    mem_write(16'h0002, 8'h71);
    run_published("encrypt", enc, CIPHER);
    expect_eq("keys after encryption", 128'(lbc_keys[15:0]), 128'h7173);
    run_published("decrypt", dec, PLAIN);
    for (int t = 0; t < 50; t++) round_trip(10 + t);
    // every mechanism must have been exercised
    begin
      int needed [string];
      needed["toggle"] = n_toggle;        needed["core opcode"] = n_id;
      needed["LOD16"] = n_vi[VI_LOD16];   needed["STO16"] = n_vi[VI_STO16];
      needed["LDKEY"] = n_vi[VI_LDKEY];   needed["HIKEY"] = n_vi[VI_HIKEY];
      needed["LOWKY"] = n_vi[VI_LOWKY];   needed["CLW"] = n_vi[VI_CLW];
      needed["ACLW"] = n_vi[VI_ACLW];     needed["FLPKB"] = n_vi[VI_FLPK];
      needed["CRY1B"] = n_vi[VI_CRY1];    needed["CRY2B"] = n_vi[VI_CRY2];
      needed["CRY3B"] = n_vi[VI_CRY3];    needed["CRY4B"] = n_vi[VI_CRY4];
      needed["clockwise step"] = n_cw_cry; needed["anticlockwise step"] = n_acw_cry;
      needed["high nibble step"] = n_hi_cry; needed["low nibble step"] = n_lo_cry;
      foreach (needed[k]) begin
        checks++;
        $display("mechanism %-20s %0d", k, needed[k]);
        if (needed[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
