// tb_sbox_affine: exhaustive check of the affine transform against its
// bit-matrix form, plus the full S-Box chain for the first row of the
// standard table (inputs 0x00..0x0B: 63 7C 77 7B F2 6B 6F C5 30 01 67 2B).
module tb_sbox_affine;
  import tb_aes_ref_pkg::*;

  logic [7:0] y, r;
  logic [7:0] row0 [12] = '{8'h63, 8'h7C, 8'h77, 8'h7B, 8'hF2, 8'h6B,
                            8'h6F, 8'hC5, 8'h30, 8'h01, 8'h67, 8'h2B};
  int checks = 0, failures = 0;

  sbox_affine dut (.y_i(y), .res_o(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      y = 8'(i); #1;
      checks++;
      if (r !== affine(y)) begin
        failures++;
        $display("FAIL A(%h) = %h, expected %h", y, r, affine(y));
      end
    end
    for (int i = 0; i < 12; i++) begin
      y = inv(8'(i)); #1;
      checks++;
      if (r !== row0[i]) begin
        failures++;
        $display("FAIL S(%h) = %h, expected %h", i, r, row0[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
