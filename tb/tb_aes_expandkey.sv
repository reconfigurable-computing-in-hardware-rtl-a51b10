// tb_aes_expandkey: loads the FIPS-197 Appendix A.1 cipher key and checks all
// ten round keys printed in the standard's key-expansion table, then reloads
// and checks that the sequence restarts.
module tb_aes_expandkey;
  logic clock = 0, reset = 1, load_key = 0, next_key = 0;
  logic [127:0] key_128, par_key;
  logic [3:0] round;
  int checks = 0, failures = 0;
  logic [127:0] rk [1:10] = '{
    128'ha0fafe1788542cb123a339392a6c7605, 128'hf2c295f27a96b9435935807a7359f67f,
    128'h3d80477d4716fe3e1e237e446d7a883b, 128'hef44a541a8525b7fb671253bdb0bad00,
    128'hd4d1c6f87c839d87caf2b8bc11f915bc, 128'h6d88a37a110b3efddbf98641ca0093fd,
    128'h4e54f70e5f5fc9f384a64fb24ea6dc4f, 128'head27321b58dbad2312bf5607f8d292f,
    128'hac7766f319fadc2128d12941575c006e, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6};

  aes_expandkey dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (500) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    key_128 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    repeat (2) @(posedge clock);
    reset <= 0;
    for (int pass = 0; pass < 2; pass++) begin
      load_key <= 1; @(posedge clock); load_key <= 0; @(posedge clock);
      for (int r = 1; r <= 10; r++) begin
        #1;
        checks++;
        if (par_key !== rk[r] || round != 4'(r)) begin
          failures++; $display("FAIL round %0d got %h exp %h", r, par_key, rk[r]);
        end
        next_key <= 1; @(posedge clock); next_key <= 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
