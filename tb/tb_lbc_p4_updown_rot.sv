// tb_lbc_p4_updown_rot: checks protocol-4 (vertical rotation of selected
// columns or rows). Expected values: the published results for keys 0000b
// and 0011b, the encryption snapshots of CRY41 and CRY42 and their
// decryption counterparts, and for every key a model built from the shuffle
// table written out case by case; anticlockwise must undo clockwise.
module tb_lbc_p4_updown_rot;
  import lbc_pkg::*;
  import tb_lbc_util_pkg::*;

  int checks = 0, failures = 0;
  matrix_t m_in, m_out, m_back;
  logic cw;
  logic [3:0] key;

  lbc_p4_updown_rot dut  (.m_in(m_in),  .cw(cw),  .key(key), .m_out(m_out));
  lbc_p4_updown_rot dutb (.m_in(m_out), .cw(!cw), .key(key), .m_out(m_back));

  // Table: which columns (1..4) or which rows (1..4) take part
  function automatic matrix_t ref_cw(matrix_t a, logic [3:0] k);
    matrix_t b = a;
    logic [3:0] cols = '0, rows = '0;   // bit 3 = column/row 1
    case (k)
      4'b0011: cols = 4'b0011;  4'b1100: cols = 4'b1100;
      4'b0110: cols = 4'b0110;  4'b1001: cols = 4'b1001;
      4'b1010: cols = 4'b1010;  4'b0101: cols = 4'b0101;
      4'b0111: cols = 4'b0111;  4'b1011: cols = 4'b1011;
      4'b1101: cols = 4'b1101;  4'b1110: cols = 4'b1110;
      4'b1111: cols = 4'b1111;
      4'b0000: rows = 4'b1111;  4'b0001: rows = 4'b1110;
      4'b0010: rows = 4'b1101;  4'b0100: rows = 4'b1011;
      4'b1000: rows = 4'b0111;
      default: ;
    endcase
    for (int c = 1; c <= 4; c++)
      if (cols[4-c]) begin
        b[0][c-1] = a[3][c-1];
        for (int r = 1; r < 4; r++) b[r][c-1] = a[r-1][c-1];
      end
    if (rows != '0) begin
      int list[$];
      for (int r = 1; r <= 4; r++) if (rows[4-r]) list.push_back(r - 1);
      for (int i = 0; i < list.size(); i++)
        b[list[(i + 1) % list.size()]] = a[list[i]];
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
    m_in = labels(); cw = 1; key = 4'b0000;
    check("fig key=0000", mk(128'h41_42_43_44_11_12_13_14_21_22_23_24_31_32_33_34));
    key = 4'b0011;
    check("fig key=0011", mk(128'h11_12_43_44_21_22_13_14_31_32_23_24_41_42_33_34));
    m_in = mk(128'h90_88_89_92_98_12_23_22_20_22_33_0A_21_19_9A_21); key = 4'h7;
    check("enc step6", mk(128'h90_19_9A_21_98_88_89_92_20_12_23_22_21_22_33_0A));
    m_in = mk(128'h90_19_9A_21_98_88_89_92_20_12_23_22_21_22_33_0A); cw = 0;
    check("dec step3", mk(128'h90_88_89_92_98_12_23_22_20_22_33_0A_21_19_9A_21));
    m_in = mk(128'h11_12_43_44_21_22_13_14_31_32_23_24_41_42_33_34); key = 4'h3;
    check("dec step7", labels());
    for (int k = 0; k < 16; k++) begin
      m_in = labels(); key = 4'(k); cw = 1;
      check($sformatf("table key=%b", key), ref_cw(labels(), key));
      checks++;
      if (m_back !== m_in) begin failures++; $display("FAIL inverse key=%b", key); end
    end
    for (int i = 0; i < 100; i++) begin
      m_in = rand_matrix(); key = 4'($urandom); cw = 1;
      check("random", ref_cw(m_in, key));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
