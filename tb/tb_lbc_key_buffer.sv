// tb_lbc_key_buffer: checks loading, nibble selection and flipping of the
// four cipher keys, one operation per clock. Uses the published keys
// E3h/71h, the published flip example (0111b -> 1110b) and the E3h -> 73h
// result of flipping the high nibble of key 1, then random operations
// against a simple model.
module tb_lbc_key_buffer;
  import lbc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load = 0, set_hi = 0, set_lo = 0, flip = 0;
  logic [1:0] key_sel = 0;
  keys_t key_in = '0, keys, mkeys;
  logic hi_key, mhi;
  logic [3:0] nibble;

  lbc_key_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic step(logic l, logic h, logic lo, logic f, logic [1:0] s, keys_t kin);
    load = l; set_hi = h; set_lo = lo; flip = f; key_sel = s; key_in = kin;
    @(posedge clk); #1;
    load = 0; set_hi = 0; set_lo = 0; flip = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_eq("reset keys", keys, 0);
    expect_eq("reset lo", 32'(hi_key), 0);
    step(1, 0, 0, 0, 0, {8'h00, 8'h00, 8'h71, 8'hE3});
    expect_eq("LDKEY", keys, 32'h0000_71E3);
    key_sel = 0; #1 expect_eq("B1L", 32'(nibble), 32'h3);
    key_sel = 1; #1 expect_eq("B2L", 32'(nibble), 32'h1);
    step(0, 1, 0, 0, 0, '0);
    expect_eq("HIKEY", 32'(hi_key), 1);
    key_sel = 0; #1 expect_eq("B1H", 32'(nibble), 32'hE);
    key_sel = 1; #1 expect_eq("B2H", 32'(nibble), 32'h7);
    step(0, 0, 0, 1, 0, '0);             // FLPK1 with high nibbles active
    expect_eq("FLPK1 key", 32'(keys[0]), 32'h73);
    key_sel = 0; #1 expect_eq("B1H flipped", 32'(nibble), 32'h7);
    step(0, 0, 1, 0, 0, '0);
    step(0, 0, 0, 1, 1, '0);             // FLPK2, low: 0001 -> 1000
    expect_eq("FLPK2 low", 32'(keys[1]), 32'h78);
    // random operations against a model
    mkeys = keys; mhi = hi_key;
    for (int i = 0; i < 300; i++) begin
      logic l, h, lo, f;
      logic [1:0] s;
      keys_t kin;
      l = ($urandom % 5) == 0; h = ($urandom % 4) == 0; lo = ($urandom % 4) == 0;
      f = ($urandom % 2) == 0; s = 2'($urandom); kin = $urandom;
      if (l) mkeys = kin;
      else if (f) begin
        if (mhi) mkeys[s][7:4] = {mkeys[s][4], mkeys[s][5], mkeys[s][6], mkeys[s][7]};
        else     mkeys[s][3:0] = {mkeys[s][0], mkeys[s][1], mkeys[s][2], mkeys[s][3]};
      end
      if (h) mhi = 1; else if (lo) mhi = 0;
      step(l, h, lo, f, s, kin);
      expect_eq("random keys", keys, mkeys);
      expect_eq("random hi", 32'(hi_key), 32'(mhi));
      key_sel = 2'($urandom); #1;
      expect_eq("random nibble", 32'(nibble), 32'(mhi ? mkeys[key_sel][7:4] : mkeys[key_sel][3:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
