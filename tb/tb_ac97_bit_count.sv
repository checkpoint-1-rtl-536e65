// tb_ac97_bit_count: checks the frame counter decodes over three frames.
// Expected values are written out from the frame layout (a 16-bit tag, then
// twelve 20-bit slots; incoming bits two cycles late): sync on counts 255 and
// 0..14 (16 of 256), slot loads on 255 (slot 0) and 15 + 20(s-1), captures on
// 17 + 20s modulo 256, request on 250 and answer window 251..254. It also
// checks that the frame period is 256 cycles and that the first slot-0 load
// comes one cycle after reset.
module tb_ac97_bit_count;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] bit_cnt;
  logic sync, tx_load, rx_capture, req, resp;
  logic [3:0] tx_slot, rx_slot;
  int checks = 0, failures = 0;

  ac97_bit_count dut (.*);

  always #5ns clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sync_n, load_n, last_load0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);                 // first cycle out of reset
    #1ns;
    check(tx_load && tx_slot == 0, "slot 0 loaded one cycle after reset");
    sync_n = 0; load_n = 0; last_load0 = 0;
    for (int c = 0; c < 3 * 256; c++) begin
      int n, exp_tx, exp_rx;
      bit e_sync, e_tx, e_rx;
      n = (255 + c) % 256;
      check(bit_cnt == 8'(n), $sformatf("count %0d expected %0d", bit_cnt, n));
      e_sync = (n == 255) || (n <= 14);
      check(sync == e_sync, $sformatf("sync at %0d", n));
      e_tx = 0; exp_tx = 0; e_rx = 0; exp_rx = 0;
      if (n == 255) begin e_tx = 1; exp_tx = 0; end
      for (int s = 1; s <= 12; s++) if (n == 15 + 20 * (s - 1)) begin e_tx = 1; exp_tx = s; end
      for (int s = 0; s <= 12; s++) if (n == (17 + 20 * s) % 256) begin e_rx = 1; exp_rx = s; end
      check(tx_load == e_tx && (!e_tx || tx_slot == 4'(exp_tx)), $sformatf("tx load at %0d", n));
      check(rx_capture == e_rx && (!e_rx || rx_slot == 4'(exp_rx)), $sformatf("rx capture at %0d", n));
      check(req == (n == 250), $sformatf("req at %0d", n));
      check(resp == (n >= 251 && n <= 254), $sformatf("resp at %0d", n));
      if (sync) sync_n++;
      if (tx_load) load_n++;
      if (tx_load && tx_slot == 0) begin
        if (c > 0) check(c - last_load0 == 256, "frame period 256 cycles");
        last_load0 = c;
      end
      @(posedge clk);
      #1ns;
    end
    check(sync_n == 3 * 16, $sformatf("sync cycles %0d", sync_n));
    check(load_n == 3 * 13, $sformatf("slot loads %0d", load_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
