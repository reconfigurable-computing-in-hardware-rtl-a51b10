// tb_aes_addroundkey: checks AddRoundKey on random states and keys against
// the XOR computed in the testbench, plus the FIPS-197 App. B round-1 value.
module tb_aes_addroundkey;
  logic [127:0] d, k, q;
  int checks = 0, failures = 0;
  aes_addroundkey dut (.data_in(d), .key_in(k), .data_out(q));

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    d = 128'h046681e5e0cb199a48f8d37a2806264c;
    k = 128'ha0fafe1788542cb123a339392a6c7605; #1;
    checks++;
    if (q !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin failures++; $display("FAIL fips %h", q); end
    for (int i = 0; i < 100; i++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      for (int b = 0; b < 128; b++)
        if (q[b] != (d[b] != k[b])) begin failures++; $display("FAIL bit %0d", b); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
