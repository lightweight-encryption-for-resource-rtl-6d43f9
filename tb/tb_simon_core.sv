// tb_simon_core: end-to-end test of the SIMON 32/64 core through its serial
// pins.
//
// Sends blocks back to back, one every 128 clocks: plaintext bits on
// serial_in in clocks 0..31 and key bits on key_in in clocks 0..63, least
// significant bit first, then reads 32 ciphertext bits in clocks 96..127.
// Expected ciphertexts come from three published SIMON 32/64 test pairs and
// from a behavioural SIMON model in this file for random blocks. It also
// checks that data_ready_n is low exactly in clocks 96..127 and that the
// debug state follows the four operating regions.
module tb_simon_core;
  import simon_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic serial_in = 1'b0, key_in = 1'b0;
  logic serial_out, data_ready_n;
  simon_state_e dbg_state;
  int checks = 0, failures = 0;

  simon_core dut (.clk, .rst_n, .serial_in, .key_in, .serial_out, .data_ready_n, .dbg_state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] rl(logic [15:0] x, int s);
    return (x << s) | (x >> (16 - s));
  endfunction

  function automatic logic [31:0] simon_model(logic [31:0] pt, logic [63:0] key);
    string z = "11111010001001010110000111001101111101000100101011000011100110";
    logic [15:0] k [32];
    logic [15:0] xl, xr, t, tmp;
    for (int i = 0; i < 4; i++) k[i] = key[16*i +: 16];
    for (int i = 0; i < 28; i++) begin
      t = rl(k[i+3], 13) ^ k[i+1];
      t = t ^ rl(t, 15);
      k[i+4] = k[i] ^ t ^ 16'hFFFC ^ ((z[i] == "1") ? 16'd1 : 16'd0);
    end
    xl = pt[31:16]; xr = pt[15:0];
    for (int i = 0; i < 32; i++) begin
      tmp = xl;
      xl  = (rl(xl, 1) & rl(xl, 8)) ^ rl(xl, 2) ^ xr ^ k[i];
      xr  = tmp;
    end
    return {xl, xr};
  endfunction

  // One 128-clock operation; returns the ciphertext read from serial_out.
  task automatic run_block(input logic [31:0] pt, input logic [63:0] key,
                           output logic [31:0] ct);
    simon_state_e exp_state;
    // Called at a falling edge inside clock 0; each step drives and samples
    // mid-clock, then moves on to the next falling edge.
    for (int c = 0; c < 128; c++) begin
      serial_in = (c < 32) ? pt[c] : 1'b0;
      key_in    = (c < 64) ? key[c] : 1'b0;
      exp_state = simon_state_e'(c / 32);
      checks++;
      if (dbg_state != exp_state || data_ready_n != (c < 96)) begin
        failures++;
        $display("clock %0d: state %0d data_ready_n %0b", c, dbg_state, data_ready_n);
      end
      if (c >= 96) ct[c-96] = serial_out;
      @(negedge clk);
    end
  endtask

  task automatic check_block(input logic [31:0] pt, input logic [63:0] key,
                             input logic [31:0] exp_ct);
    logic [31:0] ct;
    run_block(pt, key, ct);
    checks++;
    if (ct !== exp_ct) begin
      failures++;
      $display("FAIL pt=%h key=%h ct=%h expected %h", pt, key, ct, exp_ct);
    end
  endtask

  initial begin
    logic [31:0] pt;
    logic [63:0] key;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;   // released mid-clock; the next rising edge ends clock 0
    // Published pairs (the first is the SIMON 32/64 reference vector).
    check_block(32'h6565_6877, 64'h1918_1110_0908_0100, 32'hC69B_E9BB);
    check_block(32'h524A_B37D, 64'h1918_1110_0908_0100, 32'hF514_71C9);
    check_block(32'hAC91_BAC0, 64'h1029_3847_56AF_EDB3, 32'h57E1_5C37);
    // The model against the reference vector, then random blocks.
    checks++;
    if (simon_model(32'h6565_6877, 64'h1918_1110_0908_0100) != 32'hC69B_E9BB) failures++;
    for (int n = 0; n < 40; n++) begin
      pt  = $urandom;
      key = {$urandom, $urandom};
      check_block(pt, key, simon_model(pt, key));
    end
    // Asynchronous reset in the middle of an operation restarts the schedule.
    repeat (50) @(negedge clk);
    #2 rst_n = 1'b0;
    #1;
    checks++;
    if (dbg_state != ST_LOAD_PT || data_ready_n != 1'b1) failures++;
    @(negedge clk);
    rst_n = 1'b1;
    check_block(32'h6565_6877, 64'h1918_1110_0908_0100, 32'hC69B_E9BB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
