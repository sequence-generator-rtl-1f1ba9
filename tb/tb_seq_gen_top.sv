// tb_seq_gen_top: end-to-end test of the sequence generator at its default
// parameters (the chip's own ROM contents and clock ratios), with a 625 kHz
// clock.
//
// Enable is driven as a 500 Hz square wave (1 ms high, 1 ms low). For each
// rising edge of enable the test checks that:
//   - tx_en rises 409.6 us after enable (delay code 2, in whole fc2
//     periods), to within one input clock period;
//   - tx_en stays high for exactly 204.8 us (128 bit periods);
//   - the 128 bits of seq_out are the 64-bit identification value, in
//     transmit order, twice;
//   - the supply rail is on for exactly delay + transmission (384 cycles)
//     and goes off at the end of the transmission;
//   - no second transmission starts while enable is still high.
// It then aborts a cycle by dropping enable during the delay and during a
// transmission, checks that tx_en stops, and checks that a following full
// cycle is again correct. The expected bit string is written out here in
// transmit order, independently of the ROM layout. The DFF and TFF test
// cells are exercised on their own pins. Every mechanism is counted and a
// mechanism that never occurred counts as a failure.
`timescale 1ns/1ps
module tb_seq_gen_top;
  localparam realtime TCLK = 1600ns;
  // 64-bit identification value, first transmitted bit in bit 63.
  localparam logic [63:0] EXPECTED = 64'h4855_525a_6500_0080;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic seq_out, tx_en, active;
  logic test_clk = 1'b0, test_d = 1'b0, test_t = 1'b0, test_tff_q, test_dff_q;

  int checks = 0, failures = 0;
  int n_activate = 0, n_tx = 0, n_good_tx = 0, n_powerdown = 0, n_held = 0;
  int n_abort_delay = 0, n_abort_tx = 0, n_repeat = 0, n_test_cells = 0;
  int rail_cycles, tx_count;
  realtime t_en, t_rise, t_fall;
  logic bits[$];
  logic first_cycle[$];

  seq_gen_top dut (
    .clk, .rst_n, .enable, .seq_out, .tx_en, .active,
    .test_clk, .test_d, .test_t, .test_tff_q, .test_dff_q
  );

  always #(TCLK / 2) clk = ~clk;

  always @(posedge enable) t_en = $realtime;
  always @(posedge tx_en) begin t_rise = $realtime; tx_count++; end
  always @(negedge tx_en) t_fall = $realtime;
  always @(negedge clk) begin
    if (tx_en) bits.push_back(seq_out);
    if (active) rail_cycles++;
  end
  always @(posedge active) n_activate++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  // One 500 Hz enable period: 625 cycles high, 625 low.
  task automatic full_cycle();
    bit ok;
    bits.delete();
    rail_cycles = 0;
    tx_count = 0;
    @(negedge clk) enable = 1'b1;
    repeat (625) @(negedge clk);
    enable = 1'b0;
    repeat (625) @(negedge clk);
    check(tx_count == 1, "exactly one transmission per enable edge");
    if (tx_count == 1) n_held++;
    check(t_rise - t_en >= 409.6us && t_rise - t_en < 409.6us + TCLK, "delay 409.6 us");
    check(t_fall - t_rise == 204.8us, "transmit enable high 204.8 us");
    check(bits.size() == 128, "128 bits sent");
    ok = (bits.size() == 128);
    for (int k = 0; k < bits.size() && k < 128; k++) begin
      checks++;
      if (bits[k] !== EXPECTED[63 - (k % 64)]) begin
        failures++; ok = 0;
        $display("FAIL bit %0d: got %0b expected %0b", k, bits[k], EXPECTED[63 - (k % 64)]);
      end
    end
    if (ok) begin n_tx++; n_good_tx++; end
    check(rail_cycles == 384, "rail on for delay plus transmission");
    if (rail_cycles == 384) n_powerdown++;
    if (first_cycle.size() == 0) first_cycle = bits;
    else begin
      check(bits == first_cycle, "sequence reproduced on a later cycle");
      if (bits == first_cycle) n_repeat++;
    end
  endtask

  initial begin
    #(200000 * TCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Test cells on their own clock.
  initial begin
    logic d_before, t_before, q_before;
    @(posedge rst_n);
    for (int n = 0; n < 64; n++) begin
      #50 test_d = 1'($urandom); test_t = 1'($urandom);
      d_before = test_d; t_before = test_t; q_before = test_tff_q;
      #50 test_clk = 1'b1;
      #10;
      check(test_dff_q == d_before && test_tff_q == (q_before ^ t_before), "test cells");
      n_test_cells++;
      #40 test_clk = 1'b0;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(!tx_en && !active, "passive after reset");

    full_cycle();
    full_cycle();

    // Abort during the delay: enable falls 100 cycles after it rose.
    tx_count = 0;
    @(negedge clk) enable = 1'b1;
    repeat (100) @(negedge clk);
    enable = 1'b0;
    repeat (2) @(negedge clk);
    check(!active, "rail off after enable falls during delay");
    repeat (600) @(negedge clk);
    check(tx_count == 0, "no transmission after abort in delay");
    if (tx_count == 0 && !active) n_abort_delay++;

    full_cycle();

    // Abort during transmission: enable falls 20 bits into it.
    @(negedge clk) enable = 1'b1;
    wait (tx_en);
    repeat (20) @(negedge clk);
    enable = 1'b0;
    @(negedge clk);
    check(!tx_en && !active, "transmission stops when enable falls");
    if (!tx_en) n_abort_tx++;
    repeat (700) @(negedge clk);

    full_cycle();

    check(n_activate >= 6, "power-up happened");
    check(n_good_tx > 0, "delayed transmission happened");
    check(n_powerdown > 0, "power-down at end of transmission happened");
    check(n_held > 0, "held enable without restart happened");
    check(n_abort_delay > 0, "abort during delay happened");
    check(n_abort_tx > 0, "abort during transmission happened");
    check(n_repeat > 0, "repeated cycle happened");
    check(n_test_cells > 0, "test cells exercised");
    $display("power-ups=%0d good transmissions=%0d power-downs=%0d held-enable=%0d abort-in-delay=%0d abort-in-tx=%0d repeats=%0d test-cell-clocks=%0d",
             n_activate, n_good_tx, n_powerdown, n_held, n_abort_delay, n_abort_tx, n_repeat, n_test_cells);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
