// tb_simon_200k: long functional run of the SIMON 32/64 core, 200,000 random
// plaintexts under random keys, back to back through the serial pins, every
// ciphertext compared with a behavioural SIMON model. Also checks that each
// block takes exactly 128 clocks (ciphertext bit 0 appears 96 clocks after
// the block's first input bit and data_ready_n stays low for 32 clocks).
module tb_simon_200k;
  import simon_pkg::*;

  localparam int BLOCKS = 200_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic serial_in = 1'b0, key_in = 1'b0;
  logic serial_out, data_ready_n;
  simon_state_e dbg_state;
  int checks = 0, failures = 0;

  simon_core dut (.clk, .rst_n, .serial_in, .key_in, .serial_out, .data_ready_n, .dbg_state);

  always #5 clk = ~clk;

  initial begin
    repeat (BLOCKS * 128 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] rl(logic [15:0] x, int s);
    return (x << s) | (x >> (16 - s));
  endfunction

  function automatic logic [31:0] simon_model(logic [31:0] pt, logic [63:0] key);
    logic [61:0] z = 62'h19C3522FB386A45F;   // z_0, bit i = z_0[i]
    logic [15:0] k [32];
    logic [15:0] xl, xr, t, tmp;
    for (int i = 0; i < 4; i++) k[i] = key[16*i +: 16];
    for (int i = 0; i < 28; i++) begin
      t = rl(k[i+3], 13) ^ k[i+1];
      t = t ^ rl(t, 15);
      k[i+4] = k[i] ^ t ^ 16'hFFFC ^ {15'd0, z[i]};
    end
    xl = pt[31:16]; xr = pt[15:0];
    for (int i = 0; i < 32; i++) begin
      tmp = xl;
      xl  = (rl(xl, 1) & rl(xl, 8)) ^ rl(xl, 2) ^ xr ^ k[i];
      xr  = tmp;
    end
    return {xl, xr};
  endfunction

  initial begin
    logic [31:0] pt, ct;
    logic [63:0] key;
    int ready;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // The reference vector first, to tie the model to the published result.
    checks++;
    if (simon_model(32'h6565_6877, 64'h1918_1110_0908_0100) != 32'hC69B_E9BB) failures++;
    for (int n = 0; n < BLOCKS; n++) begin
      pt  = (n == 0) ? 32'h6565_6877 : $urandom;
      key = (n == 0) ? 64'h1918_1110_0908_0100 : {$urandom, $urandom};
      ready = 0;
      for (int c = 0; c < 128; c++) begin
        serial_in = (c < 32) ? pt[c] : 1'b0;
        key_in    = (c < 64) ? key[c] : 1'b0;
        if (!data_ready_n) ready++;
        if (c == 96 && data_ready_n) failures++;
        if (c >= 96) ct[c-96] = serial_out;
        @(negedge clk);
      end
      checks++;
      if (ct !== simon_model(pt, key) || ready != 32) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d pt=%h key=%h ct=%h", n, pt, key, ct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
