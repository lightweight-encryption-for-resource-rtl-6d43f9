// tb_simon_key_expand: checks the key expansion against the key-schedule
// equations evaluated bit by bit, for random words and both values of the
// z bit.
module tb_simon_key_expand;
  import simon_pkg::*;

  word_t k0, k1, k3, k4, t, exp_k4;
  logic  z;
  int checks = 0, failures = 0;

  simon_key_expand dut (.k0_i(k0), .k1_i(k1), .k3_i(k3), .z_i(z), .k4_o(k4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      k0 = 16'($urandom); k1 = 16'($urandom); k3 = 16'($urandom); z = 1'($urandom);
      #1;
      for (int b = 0; b < 16; b++) t[b] = k3[(b + 3) % 16] ^ k1[b];
      for (int b = 0; b < 16; b++)
        exp_k4[b] = k0[b] ^ t[b] ^ t[(b + 1) % 16] ^ (b >= 2) ^ ((b == 0) ? z : 1'b0);
      checks++;
      if (k4 !== exp_k4) begin
        failures++;
        $display("FAIL k0=%h k1=%h k3=%h z=%b -> %h exp %h", k0, k1, k3, z, k4, exp_k4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
