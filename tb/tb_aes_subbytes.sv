// tb_aes_subbytes: checks SubBytes against known S-box entries of the AES
// standard (00->63, 01->7c, 53->ed, ff->16, 10->ca, c9->dd ...) placed at
// every byte position, and against a full-state vector from FIPS-197 App. B.
module tb_aes_subbytes;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  aes_subbytes dut (.subbytes_in(din), .subbytes_out(dout));

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    static logic [7:0] ins  [8] = '{8'h00, 8'h01, 8'h53, 8'hff, 8'h10, 8'hc9, 8'h8d, 8'h2a};
    static logic [7:0] outs [8] = '{8'h63, 8'h7c, 8'hed, 8'h16, 8'hca, 8'hdd, 8'h5d, 8'he5};
    for (int k = 0; k < 8; k++) begin
      for (int p = 0; p < 16; p++) begin
        din = {16{8'h00}};
        din[127 - 8*p -: 8] = ins[k];
        #1;
        chk(dout, ({16{8'h63}} & ~(128'hff << (120 - 8*p))) | (128'(outs[k]) << (120 - 8*p)),
            $sformatf("byte %0d value %h", p, ins[k]));
      end
    end
    // FIPS-197 Appendix B, round 1: start of round -> after SubBytes
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    chk(dout, 128'hd42711aee0bf98f1b8b45de51e415230, "fips round1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
