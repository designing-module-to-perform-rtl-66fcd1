// tb_lbc_p1_byte_rot: checks protocol-1 (half-matrix byte rotation).
// Expected values: the two published rotation examples (keys 0011b and
// 0001b, clockwise), the encryption snapshot of CRY11, and for random data
// an independent model written as the explicit per-byte assignments of a
// clockwise step; anticlockwise is checked as the exact inverse.
module tb_lbc_p1_byte_rot;
  import lbc_pkg::*;
  import tb_lbc_util_pkg::*;

  int checks = 0, failures = 0;
  matrix_t m_in, m_out, m_back;
  logic cw;
  logic [1:0] en;

  lbc_p1_byte_rot dut  (.m_in(m_in),  .cw(cw),  .en(en), .m_out(m_out));
  lbc_p1_byte_rot dutb (.m_in(m_out), .cw(!cw), .en(en), .m_out(m_back));

  function automatic matrix_t ref_cw(matrix_t a, logic [1:0] e);
    matrix_t b = a;
    for (int h = 0; h < 2; h++) begin
      int L = 2*h, R = 2*h + 1;
      if (e[1-h]) begin
        b[0][R] = a[0][L]; b[0][L] = a[1][L]; b[1][L] = a[2][L]; b[2][L] = a[3][L];
        b[3][L] = a[3][R]; b[3][R] = a[2][R]; b[2][R] = a[1][R]; b[1][R] = a[0][R];
      end
    end
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
    m_in = labels(); cw = 1; en = 2'b11;
    check("fig key=0011", mk(128'h21_11_23_13_31_12_33_14_41_22_43_24_42_32_44_34));
    en = 2'b01;
    check("fig key=0001", mk(128'h11_12_23_13_21_22_33_14_31_32_43_24_41_42_44_34));
    en = 2'b00;
    check("key=00", labels());
    en = 2'b10;
    check("key=10", ref_cw(labels(), 2'b10));
    // CRY11, clockwise, nibble 3: encryption step 3
    m_in = mk(128'h11_12_43_44_21_22_13_14_31_32_23_24_41_42_33_34); en = 2'b11;
    check("enc step3", mk(128'h21_11_13_43_31_12_23_44_41_22_33_14_42_32_34_24));
    // decryption step 6: anticlockwise undoes it
    m_in = mk(128'h21_11_13_43_31_12_23_44_41_22_33_14_42_32_34_24); cw = 0;
    check("dec step6", mk(128'h11_12_43_44_21_22_13_14_31_32_23_24_41_42_33_34));
    for (int i = 0; i < 200; i++) begin
      m_in = rand_matrix(); en = 2'($urandom); cw = 1;
      check("random cw", ref_cw(m_in, en));
      checks++;
      if (m_back !== m_in) begin failures++; $display("FAIL inverse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
