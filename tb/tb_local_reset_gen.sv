// tb_local_reset_gen: a 27 MHz Clock and a 12.288 MHz LocalClock that stops
// while LocalClockReset is high, as the codec's bit clock does. For two
// Reset pulses it checks: LocalRegReset rises before LocalClockReset;
// LocalClockReset rises within a few Clock cycles of Reset; it stays high for
// ceil(13 * 27 / 12.288) = 29 Clock cycles, at least 13 LocalClock periods
// (1.058 us); LocalRegReset falls after LocalClockReset and only after at
// least two LocalClock edges have been seen with it high once the clock runs
// again.
module tb_local_reset_gen;
  logic Clock = 1'b0, Reset = 1'b0, LocalClock = 1'b0;
  logic LocalClockReset, LocalRegReset;
  int checks = 0, failures = 0;

  local_reset_gen dut (.*);

  always #18.518ns Clock = ~Clock;
  always begin
    #40.69ns;
    if (!LocalClockReset) LocalClock = ~LocalClock;
    else LocalClock = 1'b0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lcr_cycles, lrr_edges_after;
  always @(posedge Clock) if (LocalClockReset) lcr_cycles++;
  always @(posedge LocalClock) if (LocalRegReset && !LocalClockReset) lrr_edges_after++;

  initial begin
    realtime t_rise, t_fall;
    for (int k = 0; k < 2; k++) begin
      repeat (20) @(posedge Clock);
      lcr_cycles = 0;
      Reset <= 1'b1;
      @(posedge Clock);
      Reset <= 1'b0;
      lrr_edges_after = 0;
      // within 8 Clock cycles LocalClockReset must rise, LocalRegReset first
      for (int i = 0; i < 8 && !LocalClockReset; i++) begin
        @(posedge Clock); #1ns;
      end
      check(LocalClockReset === 1'b1, "LocalClockReset rises within a few Clock cycles");
      check(LocalRegReset === 1'b1, "LocalRegReset already high when LocalClockReset rises");
      t_rise = $realtime;
      lrr_edges_after = 0;
      @(negedge LocalClockReset);
      t_fall = $realtime;
      check(t_fall - t_rise >= 1.058us, $sformatf("LocalClockReset width %0t", t_fall - t_rise));
      check(lcr_cycles == 29, $sformatf("LocalClockReset Clock cycles %0d", lcr_cycles));
      check(LocalRegReset === 1'b1, "LocalRegReset still high after LocalClockReset");
      lrr_edges_after = 0;
      @(negedge LocalRegReset);
      check(lrr_edges_after >= 2, $sformatf("LocalClock edges with LocalRegReset %0d", lrr_edges_after));
      check(!LocalClockReset, "LocalClockReset low after sequence");
      repeat (40) @(posedge Clock);
      check(!LocalRegReset && !LocalClockReset, "both resets stay low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
