// tb_gf_mul_karatsuba: exhaustive check of the Karatsuba GF(2^8) multiplier
// against the doubling reference for all 65536 operand pairs.
module tb_gf_mul_karatsuba;
  import tb_aes_ref_pkg::*;

  logic [7:0] a, b, p;
  int checks = 0, failures = 0;

  gf_mul_karatsuba dut (.a_i(a), .b_i(b), .p_o(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (p !== mul(a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %h*%h = %h, expected %h", a, b, p, mul(a, b));
      end
    end
    // Worked example from the AES standard: 0x57 * 0x83 = 0xC1.
    a = 8'h57; b = 8'h83; #1;
    checks++;
    if (p !== 8'hC1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
