// tb_simon_data_reg: checks the three modes of the state register: serial
// shift (least significant bit out first), hold, and parallel load, against
// a shadow copy kept in the testbench.
module tb_simon_data_reg;
  import simon_pkg::*;

  logic clk = 0, rst_n = 0, serial_i = 0, serial_o;
  mux_mode_e mode = MODE_IDLE;
  word_t xl_nxt = '0, xr_nxt = '0, xl, xr;
  logic [31:0] shadow;
  int checks = 0, failures = 0;

  simon_data_reg dut (.clk, .rst_n, .mode_i(mode), .serial_i, .xl_nxt_i(xl_nxt),
                      .xr_nxt_i(xr_nxt), .xl_o(xl), .xr_o(xr), .serial_o);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shadow = '0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if ({xl, xr} !== shadow || serial_o !== shadow[0]) begin
        failures++;
        $display("FAIL state %h expected %h", {xl, xr}, shadow);
      end
      mode     = (n < 64) ? MODE_FIFO : mux_mode_e'($urandom_range(0, 2));
      serial_i = 1'($urandom);
      xl_nxt   = 16'($urandom);
      xr_nxt   = 16'($urandom);
      case (mode)
        MODE_FIFO:    for (int b = 0; b < 32; b++) shadow[b] = (b == 31) ? serial_i : shadow[b+1];
        MODE_ENCRYPT: shadow = {xl_nxt, xr_nxt};
        default:      ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
