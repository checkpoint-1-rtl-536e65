// tb_audio_top_full: one complete record-and-playback operation of the audio
// system at its default size (32768-sample FIFO, 4 kHz, 27 MHz system clock)
// against the codec model. After reset and codec configuration it records
// for about 0.05 s (200 samples at 4 kHz), presses play - which ends the
// recording - and lets the clip play to the end. Checks: the codec is
// configured, the played samples are the recorded left-channel samples, in
// both channels, in order, one every 12 frames, and the link stays clean.
module tb_audio_top_full;
  localparam int CLIP = 200;

  logic Clock = 1'b0, Reset = 1'b1;
  logic AP_SDATA_OUT, AP_BIT_CLOCK, AP_SDATA_IN, AP_SYNC, AP_RESET_, AP_PC_BEEP;
  logic [4:0] SpeakerVolume = 5'd16, MicVolume = 5'd20;
  logic SpeakerMute = 1'b0, MicMute = 1'b0, RecordButton = 1'b0, PlayButton = 1'b0;
  logic Recording, Playing, BufferFull, BufferEmpty;
  int checks = 0, failures = 0;

  audio_top dut (.*);
  lm4549a_model codec (.AP_RESET_(AP_RESET_), .AP_BIT_CLOCK(AP_BIT_CLOCK),
                       .AP_SYNC(AP_SYNC), .AP_SDATA_OUT(AP_SDATA_OUT),
                       .AP_SDATA_IN(AP_SDATA_IN));

  always #18.518ns Clock = ~Clock;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frames(int n);
    repeat (n * 256) @(posedge AP_BIT_CLOCK);
  endtask

  task automatic press(ref logic b);
    b = 1'b1;
    repeat (8) @(posedge AP_BIT_CLOCK);
    b = 1'b0;
  endtask

  int fr = 0, last_play = -1, play_gap_bad = 0, prev_pcm_rx = 0;
  always @(posedge AP_BIT_CLOCK) begin
    fr++;
    if (codec.pcm_rx != prev_pcm_rx) begin
      if (last_play >= 0 && fr - last_play != 12 * 256) play_gap_bad++;
      last_play = fr;
      prev_pcm_rx = codec.pcm_rx;
    end
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int recorded;
    repeat (4) @(posedge Clock);
    Reset <= 1'b0;
    wait (AP_RESET_ === 1'b0);
    wait (AP_RESET_ === 1'b1);
    frames(16);
    check(codec.regs[7'h2A] == 16'h0001 && codec.regs[7'h2C] == 16'd4000 &&
          codec.regs[7'h32] == 16'd4000, "codec at 4 kHz variable rate");
    check(codec.regs[7'h02] == 16'h0F0F, "master volume");
    check(codec.regs[7'h1C] == 16'h0A0A, "record gain");
    press(RecordButton);
    frames(CLIP * 12);
    press(PlayButton);
    recorded = dut.fifo_count;
    check(recorded >= CLIP - 2 && recorded <= CLIP + 2, $sformatf("recorded %0d samples", recorded));
    check(!BufferFull, "default FIFO not full after a short clip");
    check(Playing === 1'b1, "playing after play press");
    for (int i = 0; i < (CLIP + 10) * 12 * 256 && Playing === 1'b1; i++)
      @(posedge AP_BIT_CLOCK);
    check(Playing === 1'b0, "playback ends");
    frames(2);
    check(codec.pcm_rx == recorded, $sformatf("played %0d of %0d", codec.pcm_rx, recorded));
    begin
      int start = -1;
      for (int k = 0; k < codec.adc_log.size(); k++)
        if (start < 0 && codec.dac_got.size() > 0 &&
            codec.dac_got[0][31:16] == codec.adc_log[k][31:16]) start = k;
      check(start >= 0, "first played sample came from the codec");
      if (start >= 0)
        for (int i = 0; i < codec.dac_got.size(); i++) begin
          logic [15:0] l;
          l = codec.adc_log[start + i][31:16];
          check(codec.dac_got[i] == {l, l}, $sformatf("played %0d", i));
        end
    end
    check(play_gap_bad == 0, "one played sample every 12 frames");
    check(codec.short_resets == 0 && codec.premature == 0 && codec.sync_err == 0 &&
          codec.proto_err == 0 && codec.unrequested == 0, "clean AC link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
