// tb_aes_mixcolumns: checks MixColumns with the standard test columns
// (db135345 -> 8e4da1bc, f20a225c -> 9fdc589d, 01010101 -> 01010101,
// c6c6c6c6 -> c6c6c6c6, d4d4d4d5 -> d5d5d7d6, 2d26314c -> 4d7ebdf8) and the
// FIPS-197 Appendix B round-1 vector, then 200 random states against a
// reference that multiplies by 02 and 03 with a shift-and-add GF(2^8)
// product, independent of the design package.
module tb_aes_mixcolumns;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  aes_mixcolumns dut (.mixcolumns_in(din), .mixcolumns_out(dout));

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // reference multiply in GF(2^8): shift-and-add over the bits of b
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6; #1;
    chk(dout, 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, "columns a");
    din = 128'hd4d4d4d5_2d26314c_00000000_01010101; #1;
    chk(dout, 128'hd5d5d7d6_4d7ebdf8_00000000_01010101, "columns b");
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    chk(dout, 128'h046681e5e0cb199a48f8d37a2806264c, "fips round1");
    for (int n = 0; n < 200; n++) begin
      logic [127:0] e;
      logic [7:0] a [4];
      din = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int c = 0; c < 4; c++) begin
        for (int r = 0; r < 4; r++) a[r] = din[127 - 8*(r + 4*c) -: 8];
        for (int r = 0; r < 4; r++)
          e[127 - 8*(r + 4*c) -: 8] = gf_mul(a[r], 8'h02) ^ gf_mul(a[(r + 1) % 4], 8'h03)
                                      ^ a[(r + 2) % 4] ^ a[(r + 3) % 4];
      end
      chk(dout, e, "random state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
