// tb_lbc_p3_byte_shuffle: checks protocol-3 (keyed byte-pair swaps).
// Expected values: the published results for an all-ones key and for key
// 1001b, the encryption snapshots for keys 0001b and 0111b, and for every
// key that two passes restore the block and that a byte moves only if the
// key bits of both its column and its partner's column are set.
module tb_lbc_p3_byte_shuffle;
  import lbc_pkg::*;
  import tb_lbc_util_pkg::*;

  int checks = 0, failures = 0;
  matrix_t m_in, m_out, m_back;
  logic [3:0] key;

  lbc_p3_byte_shuffle dut  (.m_in(m_in),  .key(key), .m_out(m_out));
  lbc_p3_byte_shuffle dutb (.m_in(m_out), .key(key), .m_out(m_back));

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
    m_in = labels(); key = 4'hF;
    check("fig key=1111", mk(128'h22_23_24_44_41_11_12_13_34_43_42_31_21_33_32_14));
    key = 4'h9;
    check("fig key=1001", mk(128'h11_12_13_44_41_22_23_24_34_32_33_31_21_42_43_14));
    key = 4'h0;
    check("key=0000", labels());
    m_in = mk(128'h21_11_13_43_31_12_23_44_41_22_33_14_42_32_34_24); key = 4'h1;
    check("enc step4", mk(128'h21_11_13_24_31_12_23_44_41_22_33_14_42_32_34_43));
    m_in = mk(128'h90_19_9A_21_98_88_89_92_20_12_23_22_21_22_33_0A); key = 4'h7;
    check("enc step7", mk(128'h90_89_92_0A_98_88_19_9A_20_33_22_22_21_23_12_21));
    for (int k = 0; k < 16; k++) begin
      m_in = labels(); key = 4'(k);
      #1;
      checks++;
      if (m_back !== m_in) begin failures++; $display("FAIL involution key=%h", key); end
      // a byte that moved came from a cell whose column bit, and whose own
      // column bit, are both set
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          if (m_out[r][c] != m_in[r][c]) begin
            int sc;
            sc = int'(m_out[r][c][3:0]) - 1;
            checks++;
            if (!(key[3-c] && key[3-sc])) begin
              failures++;
              $display("FAIL key=%h cell %0d%0d moved without its key bits", key, r+1, c+1);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
