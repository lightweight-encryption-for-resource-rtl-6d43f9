// tb_simon_round: checks the SIMON round function against the round
// equation, written here bit by bit with index arithmetic rather than
// rotations, for the reference plaintext and random words.
module tb_simon_round;
  import simon_pkg::*;

  word_t xl, xr, k, xl_o, xr_o, exp_l;
  int checks = 0, failures = 0;

  simon_round dut (.xl_i(xl), .xr_i(xr), .k_i(k), .xl_o(xl_o), .xr_o(xr_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    for (int b = 0; b < 16; b++)
      exp_l[b] = (xl[(b + 15) % 16] & xl[(b + 8) % 16]) ^ xl[(b + 14) % 16] ^ xr[b] ^ k[b];
    checks++;
    if (xl_o !== exp_l || xr_o !== xl) begin
      failures++;
      $display("FAIL xl=%h xr=%h k=%h -> %h %h", xl, xr, k, xl_o, xr_o);
    end
  endtask

  initial begin
    // First round of the reference vector: key word 0x0100.
    xl = 16'h6565; xr = 16'h6877; k = 16'h0100;
    check();
    for (int n = 0; n < 2000; n++) begin
      xl = 16'($urandom); xr = 16'($urandom); k = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
