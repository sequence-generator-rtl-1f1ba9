// tb_seq_gen_delays: runs the generator with other ROM programs, covering
// the range of delay codes: 0 (transmission starts in the first Active
// cycle), 1, 37 and 255 (the longest delay, 255 x 204.8 us, the case that
// sets the 18 Hz refresh rate of a 256-tag population). Each instance gets
// its own ROM contents; one enable pulse drives all four. For each the test
// checks that tx_en is first seen 128*v + 1 clock cycles after enable
// rises (the delay in fc2 periods plus the clock edge that samples
// enable), that it stays high for 128 cycles, and that seq_out carries, for
// k = 0..127, ROM word 2 + (k/8 mod 8), column 2 + (k mod 8), both
// wrapping from 8 to 1.
`timescale 1ns/1ps
module tb_seq_gen_delays;
  localparam int NI = 4;
  localparam int CODES [NI] = '{0, 1, 37, 255};
  localparam logic [55:0] WORDS [NI] = '{56'hA5F0_3C96_1E87_D2, 56'h0123_4567_89AB_CD,
                                         56'hFFEE_0011_8421_7B, 56'h5A5A_C3C3_0FF0_99};

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  realtime t_enable;
  int   first_seen [NI];
  int   high_cycles [NI];
  logic got [NI][128];

  always #800 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < NI; g++) begin : gen_inst
    localparam logic [63:0] DATA = {WORDS[g], 8'(CODES[g])};
    logic seq_out, tx_en, active, tq, dq;

    seq_gen_top #(.ROM_DATA(DATA)) dut (
      .clk, .rst_n, .enable, .seq_out, .tx_en, .active,
      .test_clk(1'b0), .test_d(1'b0), .test_t(1'b0), .test_tff_q(tq), .test_dff_q(dq)
    );

    always @(negedge clk) begin
      if (tx_en) begin
        if (first_seen[g] < 0) first_seen[g] = int'(($realtime - t_enable) / 1600ns);
        if (high_cycles[g] < 128) got[g][high_cycles[g]] = seq_out;
        high_cycles[g]++;
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] data;
    int w, c;
    for (int g = 0; g < NI; g++) begin first_seen[g] = -1; high_cycles[g] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    enable = 1'b1;
    t_enable = $realtime;
    for (cyc = 1; cyc <= 128 * 257 + 20; cyc++) @(negedge clk);
    enable = 1'b0;
    for (int g = 0; g < NI; g++) begin
      data = {WORDS[g], 8'(CODES[g])};
      check(first_seen[g] == 128 * CODES[g] + 1,
            $sformatf("code %0d: tx_en first seen %0d cycles after enable", CODES[g], first_seen[g]));
      check(high_cycles[g] == 128, $sformatf("code %0d: tx_en high %0d cycles", CODES[g], high_cycles[g]));
      for (int k = 0; k < 128; k++) begin
        w = ((k / 8) + 1) % 8;
        c = ((k % 8) + 1) % 8;
        check(got[g][k] == data[8 * w + c], $sformatf("code %0d: bit %0d", CODES[g], k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
