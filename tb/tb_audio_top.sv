// tb_audio_top: the whole audio system against the codec model, with a
// 16-sample audio FIFO so that every mechanism is reached in a short run.
//
// Sequence: system reset -> codec reset pulse -> wait for codec ready -> the
// volume control's writes configure the codec (volumes from the switches,
// variable rate audio at 4 kHz) -> record button: microphone samples fill the
// FIFO until it is full -> play button: the samples go back out, mono, at
// 4 kHz until the FIFO is empty. Then the switches change and the new
// volume must reach the codec. Finally a second system reset while the link
// runs: the codec clock stops and restarts and the codec is set up again.
// Checks: reset pulse width, no valid frame before ready, sync, frame
// format, codec register values, recorded samples are a contiguous run of
// what the codec sent (left channel), played samples equal them in both
// channels and in order, recording and playback at one sample per 12 frames.
// Each mechanism is counted and must have happened at least once.
module tb_audio_top;
  localparam int DEPTH = 16;

  logic Clock = 1'b0, Reset = 1'b1;
  logic AP_SDATA_OUT, AP_BIT_CLOCK, AP_SDATA_IN, AP_SYNC, AP_RESET_, AP_PC_BEEP;
  logic [4:0] SpeakerVolume = 5'd27, MicVolume = 5'd12;
  logic SpeakerMute = 1'b0, MicMute = 1'b0, RecordButton = 1'b0, PlayButton = 1'b0;
  logic Recording, Playing, BufferFull, BufferEmpty;
  int checks = 0, failures = 0;

  audio_top #(.FIFO_DEPTH(DEPTH)) dut (.*);
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

  function automatic logic [15:0] vol5(logic m, logic [4:0] v);
    logic [4:0] a;
    a = 5'd31 - v;
    return {m, 2'b00, a, 3'b000, a};
  endfunction

  // mechanism counters
  int n_rereset, n_codec_reset, n_ready_wait, n_cmd, n_vra, n_rec, n_full, n_play, n_empty_end, n_vol_change;

  // sample timing at the codec pins
  int last_play = -1, play_gap_bad = 0, play_gaps = 0, fr = 0;
  always @(posedge AP_BIT_CLOCK) fr++;
  int prev_pcm_rx = 0;
  always @(posedge AP_BIT_CLOCK) begin
    if (codec.pcm_rx != prev_pcm_rx) begin
      if (last_play >= 0) begin
        play_gaps++;
        if (fr - last_play != 12 * 256) play_gap_bad++;
      end
      last_play = fr;
      prev_pcm_rx = codec.pcm_rx;
    end
  end

  initial begin
    #30ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k0;
    repeat (4) @(posedge Clock);
    Reset <= 1'b0;
    wait (AP_RESET_ === 1'b0);
    wait (AP_RESET_ === 1'b1);
    #1ns;
    n_codec_reset = codec.reset_pulses;
    frames(2);
    n_ready_wait = (codec.frames >= 2 && codec.valid_frames == 0) ? 1 : 0;
    // one full pass of the volume control's nine writes, plus margin
    frames(14);
    n_cmd = codec.writes;
    check(codec.regs[7'h2A] == 16'h0001, "VRA enabled");
    check(codec.regs[7'h2C] == 16'd4000 && codec.regs[7'h32] == 16'd4000, "4 kHz rates");
    check(codec.regs[7'h02] == vol5(0, SpeakerVolume), "master volume");
    check(codec.regs[7'h04] == vol5(0, SpeakerVolume), "line level volume");
    check(codec.regs[7'h18] == vol5(0, SpeakerVolume), "PCM out volume");
    check(codec.regs[7'h10] == vol5(0, SpeakerVolume), "line in volume");
    check(codec.regs[7'h1C] == 16'h0606, "record gain");
    check(codec.regs[7'h1A] == 16'h0000, "record select");
    n_vra = codec.regs[7'h2A][0];

    // ---- record ----
    k0 = codec.adc_log.size();
    press(RecordButton);
    for (int i = 0; i < (DEPTH + 4) * 12 * 256 && BufferFull !== 1'b1; i++)
      @(posedge AP_BIT_CLOCK);
    check(BufferFull === 1'b1, "FIFO fills while recording");
    if (BufferFull) n_full++;
    frames(30);
    check(!Recording, "recording stopped at full");
    n_rec = DEPTH;

    // ---- play ----
    press(PlayButton);
    n_play = Playing;
    check(Playing === 1'b1, "playing after play press");
    for (int i = 0; i < (DEPTH + 4) * 12 * 256 && Playing === 1'b1; i++)
      @(posedge AP_BIT_CLOCK);
    frames(2);
    n_empty_end = BufferEmpty;
    check(codec.pcm_rx == DEPTH, $sformatf("played %0d samples", codec.pcm_rx));
    // the recording is a contiguous run of the codec's samples, starting near k0
    begin
      int start = -1;
      for (int k = k0; k < k0 + 40 && k < codec.adc_log.size(); k++)
        if (codec.dac_got.size() > 0 && codec.dac_got[0][31:16] == codec.adc_log[k][31:16]) start = k;
      check(start >= 0, "first played sample was recorded from the codec");
      if (start >= 0)
        for (int i = 0; i < codec.dac_got.size(); i++) begin
          logic [15:0] l;
          l = codec.adc_log[start + i][31:16];
          check(codec.dac_got[i] == {l, l},
                $sformatf("played %0d: %h expected %h", i, codec.dac_got[i], {l, l}));
        end
    end
    check(play_gaps == DEPTH - 1 && play_gap_bad == 0,
          $sformatf("playback at 4 kHz: %0d gaps, %0d wrong", play_gaps, play_gap_bad));

    // ---- volume change ----
    SpeakerVolume = 5'd3; SpeakerMute = 1'b1; MicVolume = 5'd31; MicMute = 1'b1;
    frames(12);
    check(codec.regs[7'h02] == vol5(1, 5'd3), "new master volume");
    check(codec.regs[7'h1C] == 16'h8F0F, "new record gain and mute");
    n_vol_change = (codec.regs[7'h02] == vol5(1, 5'd3));

    // ---- second system reset while running: the bit clock stops and must
    // come back, and the codec must be configured again ----
    begin
      int vf;
      @(posedge Clock);
      Reset <= 1'b1;
      @(posedge Clock);
      Reset <= 1'b0;
      wait (AP_RESET_ === 1'b0);
      wait (AP_RESET_ === 1'b1);
      #1ns;
      check(codec.reset_pulses == 2, "second codec reset pulse");
      vf = codec.valid_frames;
      frames(16);
      check(codec.valid_frames > vf + 8, "valid frames again after the second reset");
      check(codec.regs[7'h02] == vol5(1, 5'd3), "volume written again after reset");
      n_rereset = (codec.valid_frames > vf + 8) ? 1 : 0;
    end

    check(codec.short_resets == 0, "codec reset at least 1 us");
    check(codec.premature == 0, "no valid frame before codec ready");
    check(codec.sync_err == 0, "sync 16 bit times");
    check(codec.proto_err == 0, "frames well formed");
    check(codec.unrequested == 0, "PCM only when requested");
    check(AP_PC_BEEP == 1'b0, "PC beep low");

    $display("mechanisms: codec_reset=%0d ready_wait=%0d cmd_writes=%0d vra=%0d recorded=%0d full=%0d play=%0d empty_end=%0d vol_change=%0d rereset=%0d",
             n_codec_reset, n_ready_wait, n_cmd, n_vra, n_rec, n_full, n_play, n_empty_end, n_vol_change, n_rereset);
    check(n_codec_reset > 0, "mechanism: codec reset");
    check(n_ready_wait > 0, "mechanism: wait for codec ready");
    check(n_cmd >= 9, "mechanism: register writes");
    check(n_vra > 0, "mechanism: variable rate");
    check(n_rec > 0, "mechanism: record");
    check(n_full > 0, "mechanism: FIFO full");
    check(n_play > 0, "mechanism: playback");
    check(n_empty_end > 0, "mechanism: playback ends at empty");
    check(n_vol_change > 0, "mechanism: volume change");
    check(n_rereset > 0, "mechanism: reset while running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
