// tb_lbc_p2_bit_rot: checks protocol-2 (96-bit rotation of the outer ring).
// Expected values: the encryption snapshot of CRY22 (one bit right), the
// matching decryption snapshot (one bit left), and for random data and
// amounts a model that rotates the ring one bit at a time; the inner four
// bytes must not change.
module tb_lbc_p2_bit_rot;
  import lbc_pkg::*;
  import tb_lbc_util_pkg::*;

  int checks = 0, failures = 0;
  matrix_t m_in, m_out;
  logic cw;
  logic [3:0] amount;

  lbc_p2_bit_rot dut (.m_in, .cw, .amount, .m_out);

  function automatic matrix_t ref_rot(matrix_t a, logic dir_cw, int n);
    int rr[12] = '{0, 0, 0, 0, 1, 2, 3, 3, 3, 3, 2, 1};
    int cc[12] = '{0, 1, 2, 3, 3, 3, 3, 2, 1, 0, 0, 0};
    logic [95:0] v = '0;
    matrix_t b = a;
    for (int k = 0; k < 12; k++) v = {v[87:0], a[rr[k]][cc[k]]};
    repeat (n) v = dir_cw ? {v[0], v[95:1]} : {v[94:0], v[95]};
    for (int k = 0; k < 12; k++) b[rr[k]][cc[k]] = v[95 - 8*k -: 8];
    return b;
  endfunction

  task automatic check(string what, matrix_t exp);
    #1;
    checks++;
    if (m_out !== exp) begin
      failures++;
      $display("FAIL %s: got %s exp %s", what, fmt(m_out), fmt(exp));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_in = mk(128'h21_11_13_24_31_12_23_44_41_22_33_14_42_32_34_43); cw = 1; amount = 1;
    check("enc step5", mk(128'h90_88_89_92_98_12_23_22_20_22_33_0A_21_19_9A_21));
    m_in = mk(128'h90_88_89_92_98_12_23_22_20_22_33_0A_21_19_9A_21); cw = 0;
    check("dec step4", mk(128'h21_11_13_24_31_12_23_44_41_22_33_14_42_32_34_43));
    amount = 0;
    check("amount 0", m_in);
    for (int i = 0; i < 300; i++) begin
      m_in = rand_matrix(); cw = 1'($urandom); amount = 4'($urandom);
      check("random", ref_rot(m_in, cw, int'(amount)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
