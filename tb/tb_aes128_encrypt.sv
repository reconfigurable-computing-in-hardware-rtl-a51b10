// tb_aes128_encrypt: encrypts the FIPS-197 Appendix B and Appendix C.1
// vectors, then several blocks in a row under one key, comparing with the
// published ciphertexts and checking the 11-cycle start-to-done latency.
module tb_aes128_encrypt;
  logic clock = 0, reset = 1, key_load = 0, start = 0, busy, done;
  logic [127:0] key_in, plaintext_in, ciphertext_out;
  int checks = 0, failures = 0;

  aes128_encrypt dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run(logic [127:0] pt, logic [127:0] exp);
    int cycles;
    plaintext_in <= pt; start <= 1;
    @(posedge clock); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clock); cycles++; #1; end
    checks++;
    if (ciphertext_out !== exp) begin failures++; $display("FAIL ct %h exp %h", ciphertext_out, exp); end
    checks++;
    if (cycles != 11) begin failures++; $display("FAIL latency %0d", cycles); end
    @(posedge clock);
  endtask

  initial begin
    repeat (2) @(posedge clock);
    reset <= 0;
    key_in <= 128'h2b7e151628aed2a6abf7158809cf4f3c; key_load <= 1;
    @(posedge clock); key_load <= 0;
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);
    key_in <= 128'h000102030405060708090a0b0c0d0e0f; key_load <= 1;
    @(posedge clock); key_load <= 0;
    run(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // same key kept across blocks
    run(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    key_in <= 128'h2b7e151628aed2a6abf7158809cf4f3c; key_load <= 1;
    @(posedge clock); key_load <= 0;
    // NIST SP 800-38A F.1.1 (ECB-AES128) blocks
    run(128'h6bc1bee22e409f96e93d7e117393172a, 128'h3ad77bb40d7a3660a89ecaf32466ef97);
    run(128'hae2d8a571e03ac9c9eb76fac45af8e51, 128'hf5d3d58503b9699de785895a96fdbaaf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
