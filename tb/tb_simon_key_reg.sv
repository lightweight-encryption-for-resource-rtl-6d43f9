// tb_simon_key_reg: checks the key register: after 64 serial shifts Key1
// holds the key's low word; ENCRYPT moves the words down and loads the new
// word into Key4; IDLE holds. Compared with a shadow array of four words.
module tb_simon_key_reg;
  import simon_pkg::*;

  logic clk = 0, rst_n = 0, key_i = 0;
  mux_mode_e mode = MODE_IDLE;
  word_t k_new = '0, k1, k2, k4;
  logic [63:0] shadow, key;
  int checks = 0, failures = 0;

  simon_key_reg dut (.clk, .rst_n, .mode_i(mode), .key_i, .k_new_i(k_new),
                     .key1_o(k1), .key2_o(k2), .key4_o(k4));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shadow = '0;
    key = {$urandom, $urandom};
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (k1 !== shadow[15:0] || k2 !== shadow[31:16] || k4 !== shadow[63:48]) begin
        failures++;
        $display("FAIL n=%0d %h %h %h expected %h", n, k4, k2, k1, shadow);
      end
      if (n == 64) begin
        checks++;
        if ({k4, k2, k1} !== {key[63:48], key[31:0]}) begin
          failures++;
          $display("FAIL serial load gave %h %h %h for key %h", k4, k2, k1, key);
        end
      end
      mode  = (n < 64) ? MODE_FIFO : mux_mode_e'($urandom_range(0, 2));
      key_i = (n < 64) ? key[n] : 1'($urandom);
      k_new = 16'($urandom);
      case (mode)
        MODE_FIFO:    shadow = {key_i, shadow[63:1]};
        MODE_ENCRYPT: shadow = {k_new, shadow[63:16]};
        default:      ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
