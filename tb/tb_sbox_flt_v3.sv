// tb_sbox_flt_v3: checks the 11-stage Fermat-inverse S-Box (sbox_flt_v3).
//
// Phase 1 streams all 256 byte values, one per clock with the enable held
// high, and checks every result against the reference S-Box and that each
// result appears exactly 11 clock edge(s) after its byte was taken.
// Phase 2 streams random bytes with random gaps and a randomly toggled
// enable (stall), and checks that results come out in order, none lost or
// repeated. Also checks the first row of the standard table printed as
// 63 7C 77 7B F2 6B 6F C5 30 01 67 2B.
// A second instance built with the long-form multiplier (KARATSUBA = 0) runs
// beside the default one and must produce the same outputs every clock.
module tb_sbox_flt_v3;
  import tb_aes_ref_pkg::*;

  localparam int LAT = 11;

  logic clk = 0, rst_n = 0, en = 0, valid_i = 0, valid_o;
  logic [7:0] data_i = '0, data_o;
  logic [7:0] exp_q [$];
  int         edge_q [$];
  int edge_no = 0, checks = 0, failures = 0, received = 0;
  logic [7:0] row0 [12] = '{8'h63, 8'h7C, 8'h77, 8'h7B, 8'hF2, 8'h6B,
                            8'h6F, 8'hC5, 8'h30, 8'h01, 8'h67, 8'h2B};

  sbox_flt_v3 dut (.clk, .rst_n, .en_i(en), .valid_i, .data_i, .valid_o, .data_o);

  // Second copy built with the long multiplier; must match cycle for cycle.
  logic       valid_l;
  logic [7:0] data_l;
  sbox_flt_v3 #(.KARATSUBA(1'b0)) dut_long (.clk, .rst_n, .en_i(en), .valid_i, .data_i,
                                      .valid_o(valid_l), .data_o(data_l));
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (valid_l !== valid_o || data_l !== data_o) begin
        failures++;
        $display("FAIL long-multiplier copy differs: %h/%b vs %h/%b", data_l, valid_l, data_o, valid_o);
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count edges; record each accepted byte with the edge that took it.
  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    if (rst_n && en && valid_i) begin
      exp_q.push_back(sbox(data_i));
      edge_q.push_back(edge_no);
    end
  end

  // Check outputs mid-clock, once per enabled edge that produced them.
  logic seen_en;
  always @(posedge clk) seen_en <= en;
  always @(negedge clk) begin
    if (rst_n && seen_en && valid_o) begin
      logic [7:0] e;
      int         t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL output %h with nothing outstanding", data_o);
      end else begin
        e = exp_q.pop_front();
        t = edge_q.pop_front();
        received++;
        if (data_o !== e) begin
          failures++;
          $display("FAIL got %h expected %h", data_o, e);
        end
        if (received <= 256) begin
          checks++;
          if (edge_no - 1 - t + 1 != LAT) begin
            failures++;
            $display("FAIL latency %0d expected %0d", edge_no - t, LAT);
          end
        end
      end
    end
  end

  initial begin
    // Reference self-check against the printed table row.
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (sbox(8'(i)) != row0[i]) failures++;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    en    = 1;
    for (int i = 0; i < 256; i++) begin
      valid_i = 1; data_i = 8'(i);
      @(negedge clk);
    end
    valid_i = 0;
    repeat (LAT + 2) @(negedge clk);
    for (int i = 0; i < 1500; i++) begin
      en      = ($urandom_range(0, 3) != 0);
      valid_i = ($urandom_range(0, 4) != 0);
      data_i  = 8'($urandom);
      @(negedge clk);
    end
    valid_i = 0; en = 1;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || received < 1000) begin
      failures++;
      $display("FAIL %0d results outstanding, %0d received", exp_q.size(), received);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
