// tb_ac97_rx_shift: feeds random 256-bit frames serially, MSB first, with
// the capture strobes of the real frame layout (last bit of slot s at the
// input on position 15 + 20s) and checks the captured tag, slot 1, slot 3
// and slot 4, and that tag_done / pcm_done pulse once per frame.
module tb_ac97_rx_shift;
  logic clk = 1'b0, rst = 1'b1;
  logic sdata_in, rx_capture, tag_done, pcm_done;
  logic [3:0] rx_slot;
  logic [15:0] tag;
  logic [19:0] slot1, slot3, slot4;
  int checks = 0, failures = 0;

  ac97_rx_shift dut (.*);

  always #5ns clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sdata_in = 0; rx_capture = 0; rx_slot = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 8; f++) begin
      logic [255:0] fr;
      int td, pd;
      for (int w = 0; w < 8; w++) fr[32*w +: 32] = $urandom;
      td = 0; pd = 0;
      for (int p = 0; p < 256; p++) begin
        @(negedge clk);
        sdata_in   = fr[255-p];
        rx_capture = 0;
        for (int s = 0; s <= 12; s++) if (p == 15 + 20 * s) begin rx_capture = 1; rx_slot = 4'(s); end
        @(posedge clk);
        #1ns;
        if (tag_done) td++;
        if (pcm_done) pd++;
      end
      @(posedge clk); #1ns;
      if (tag_done) td++;
      if (pcm_done) pd++;
      check(tag   == fr[255 -: 16],    $sformatf("frame %0d tag", f));
      check(slot1 == fr[255-16 -: 20], $sformatf("frame %0d slot 1", f));
      check(slot3 == fr[255-56 -: 20], $sformatf("frame %0d slot 3", f));
      check(slot4 == fr[255-76 -: 20], $sformatf("frame %0d slot 4", f));
      check(td == 1 && pd == 1, $sformatf("frame %0d done pulses %0d %0d", f, td, pd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
