// tb_aes128_decrypt: decrypts the FIPS-197 and SP 800-38A ECB ciphertexts
// back to their plaintexts, checking the 11-cycle block latency and that the
// key set-up pass takes 10 cycles.
module tb_aes128_decrypt;
  logic clock = 0, reset = 1, key_load = 0, start = 0, busy, done;
  logic [127:0] key_in, ciphertext_in, plaintext_out;
  int checks = 0, failures = 0;

  aes128_decrypt dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic setkey(logic [127:0] k);
    int cycles;
    key_in <= k; key_load <= 1;
    @(posedge clock); key_load <= 0;
    cycles = 0;
    #1;
    while (busy) begin @(posedge clock); cycles++; #1; end
    checks++;
    if (cycles != 10) begin failures++; $display("FAIL key setup %0d cycles", cycles); end
  endtask

  task automatic run(logic [127:0] ct, logic [127:0] exp);
    int cycles;
    ciphertext_in <= ct; start <= 1;
    @(posedge clock); start <= 0;
    cycles = 1;
    #1;
    while (!done) begin @(posedge clock); cycles++; #1; end
    checks++;
    if (plaintext_out !== exp) begin failures++; $display("FAIL pt %h exp %h", plaintext_out, exp); end
    checks++;
    if (cycles != 11) begin failures++; $display("FAIL latency %0d", cycles); end
    @(posedge clock);
  endtask

  initial begin
    repeat (2) @(posedge clock);
    reset <= 0;
    setkey(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run(128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    run(128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'h6bc1bee22e409f96e93d7e117393172a);
    run(128'hf5d3d58503b9699de785895a96fdbaaf, 128'hae2d8a571e03ac9c9eb76fac45af8e51);
    setkey(128'h000102030405060708090a0b0c0d0e0f);
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
