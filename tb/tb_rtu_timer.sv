// tb_rtu_timer -- self-checking test of the RTU time base.
// With a prescaler of 4 cycles, an absolute-timer reload of 3 ticks and
// round-robin slices of 2, 0 (off) and 5 ticks, it measures the spacing in
// cycles of every tick, absolute-timer event and slice expiry, checks that the
// time counter follows the ticks, and that a process switch restarts a slice.
module tb_rtu_timer;
  import rtu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] totr, atdr;
  logic [15:0] rrtr [NCPU];
  logic [NCPU-1:0] sw_pulse, rr_expire;
  logic tick, at_event;
  logic [31:0] tcr, atcr;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, last_at = -1, last_rr [NCPU];
  int nticks = 0, nat = 0, nrr [NCPU];
  logic mon = 1'b0;

  rtu_timer dut (.clk, .rst_n, .totr, .atdr, .rrtr, .sw_pulse, .tick, .tcr, .atcr,
                 .at_event, .rr_expire);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(posedge clk) begin
    #1;
    cyc++;
    if (mon) begin
      if (tick) begin
        if (last_tick >= 0) chk("tick every 4 cycles", cyc - last_tick == 4);
        last_tick = cyc;
        nticks++;
      end
      if (at_event) begin
        if (last_at >= 0) chk("absolute timer every 3 ticks", cyc - last_at == 12);
        last_at = cyc;
        nat++;
      end
      for (int c = 0; c < NCPU; c++)
        if (rr_expire[c]) begin
          if (last_rr[c] >= 0) chk($sformatf("slice of cpu %0d", c),
                                   cyc - last_rr[c] == 4 * int'(rrtr[c]));
          last_rr[c] = cyc;
          nrr[c]++;
        end
    end
  end

  initial begin
    int t0;
    totr = 32'd4;
    atdr = 32'd3;
    rrtr[0] = 16'd2;
    rrtr[1] = 16'd0;
    rrtr[2] = 16'd5;
    sw_pulse = '0;
    for (int c = 0; c < NCPU; c++) begin
      last_rr[c] = -1;
      nrr[c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    mon = 1'b1;
    repeat (200) @(posedge clk);
    #2;
    t0 = int'(tcr);
    chk("time counter counts ticks", t0 == nticks || t0 == nticks - 1);
    chk("ticks seen", nticks >= 49);
    chk("absolute timer events seen", nat >= 15);
    chk("cpu0 slices seen", nrr[0] >= 23);
    chk("cpu1 slice off", nrr[1] == 0);
    chk("cpu2 slices seen", nrr[2] >= 9);
    chk("absolute timer within range", atcr >= 1 && atcr <= 3);
    // switching every 12 cycles (3 ticks) keeps a 5-tick slice from expiring
    nrr[2] = 0;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      sw_pulse[2] = 1'b1;
      @(negedge clk);
      sw_pulse[2] = 1'b0;
      repeat (10) @(negedge clk);
    end
    chk("switch restarts the slice", nrr[2] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
