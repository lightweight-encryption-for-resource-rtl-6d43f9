// tb_simon_ctrl: follows the controller over three 128-clock periods and
// checks, per clock, the two multiplexer modes, data_ready_n, the debug
// state and (in the encryption window) the z bit against the z_0 string of
// the SIMON specification.
module tb_simon_ctrl;
  import simon_pkg::*;

  logic clk = 0, rst_n = 0, z, data_ready_n;
  mux_mode_e dm, km, exp_dm, exp_km;
  simon_state_e st;
  string zs = "11111010001001010110000111001101111101000100101011000011100110";
  int checks = 0, failures = 0;

  simon_ctrl dut (.clk, .rst_n, .data_mode_o(dm), .key_mode_o(km), .z_o(z),
                  .data_ready_n_o(data_ready_n), .state_o(st));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;   // clock 0 of the first period
    for (int n = 0; n < 3 * 128; n++) begin
      int c;
      c = n % 128;
      exp_dm = (c < 32) ? MODE_FIFO : (c < 64) ? MODE_IDLE : (c < 96) ? MODE_ENCRYPT : MODE_FIFO;
      exp_km = (c < 64) ? MODE_FIFO : (c < 96) ? MODE_ENCRYPT : MODE_FIFO;
      checks++;
      if (dm !== exp_dm || km !== exp_km || data_ready_n !== (c < 96) ||
          st !== simon_state_e'(c / 32)) begin
        failures++;
        $display("FAIL clock %0d: modes %0d %0d ready_n %0b state %0d", c, dm, km, data_ready_n, st);
      end
      if (c >= 64 && c < 96) begin
        checks++;
        if (z !== (zs[c-64] == "1")) begin
          failures++;
          $display("FAIL round %0d z=%0b", c - 64, z);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
