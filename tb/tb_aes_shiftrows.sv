// tb_aes_shiftrows: checks ShiftRows with a state whose bytes are their own
// indices (the expected permutation is written out by hand) and with the
// FIPS-197 Appendix B round-1 vector, then with 200 random states against a
// byte-index model: output byte r + 4c is input byte r + 4((c + r) mod 4),
// byte i being bits [127-8i -: 8].
module tb_aes_shiftrows;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  aes_shiftrows dut (.shiftrows_in(din), .shiftrows_out(dout));

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    din = 128'h000102030405060708090a0b0c0d0e0f; #1;
    chk(dout, 128'h00050a0f04090e03080d02070c01060b, "index state");
    din = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    chk(dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "fips round1");
    din = '0; #1;
    chk(dout, '0, "zero");
    for (int n = 0; n < 200; n++) begin
      logic [127:0] e;
      din = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          e[127 - 8*(r + 4*c) -: 8] = din[127 - 8*(r + 4*((c + r) % 4)) -: 8];
      chk(dout, e, "random state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
