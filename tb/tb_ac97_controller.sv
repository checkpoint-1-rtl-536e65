// tb_ac97_controller: drives the AC97 controller against the codec model.
//
// A command source answers each CMD_InRequest one cycle later with the next
// entry of a test list; the last entries switch on variable rate audio and
// set both rates to 4000 Hz. A PCM source answers each PCM_InRequest with a
// counting pattern. Checks: codec reset pulse at least 1 us; no valid frame
// before codec ready; 16-cycle sync; every command and every PCM sample
// arrives in order and well formed; every recorded sample on PCM_DOut equals
// what the model sent with the low four bits dropped; one recorded sample
// per frame (256 bit clocks) at 48 kHz and one PCM request every 12 frames
// once the codec runs at 4 kHz.
module tb_ac97_controller;
  import ac97_pkg::*;

  logic Clock = 1'b0, Reset = 1'b1;
  logic AP_SDATA_OUT, AP_BIT_CLOCK, AP_SDATA_IN, AP_SYNC, AP_RESET_, AP_PC_BEEP;
  logic [31:0] PCM_DIn, PCM_DOut;
  logic        PCM_InValid, PCM_InRequest, PCM_OutValid;
  logic [6:0]  CMD_AIn;
  logic [15:0] CMD_DIn;
  logic        CMD_InValid, CMD_InRequest, AudioReset, AudioClock;

  int checks = 0, failures = 0;

  ac97_controller dut (.*);
  lm4549a_model codec (.AP_RESET_(AP_RESET_), .AP_BIT_CLOCK(AP_BIT_CLOCK),
                       .AP_SYNC(AP_SYNC), .AP_SDATA_OUT(AP_SDATA_OUT),
                       .AP_SDATA_IN(AP_SDATA_IN));

  always #18.518ns Clock = ~Clock;     // 27 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- command source ----
  localparam int NCMD = 8;
  logic [6:0]  cmd_a [NCMD] = '{7'h02, 7'h04, 7'h18, 7'h1C, 7'h10, 7'h2A, 7'h2C, 7'h32};
  logic [15:0] cmd_d [NCMD] = '{16'h8123, 16'h0A0A, 16'h1F1F, 16'h0F0F, 16'h0808,
                                16'h0001, 16'd4000, 16'd4000};
  int cmd_i = 0;
  always @(posedge AudioClock) begin
    CMD_InValid <= 1'b0;
    if (AudioReset) cmd_i <= 0;
    else if (CMD_InRequest && cmd_i < NCMD) begin
      CMD_InValid <= 1'b1;
      CMD_AIn     <= cmd_a[cmd_i];
      CMD_DIn     <= cmd_d[cmd_i];
      cmd_i       <= cmd_i + 1;
    end
  end

  // ---- PCM source ----
  logic [31:0] pcm_sent [$];
  logic [15:0] pcm_n = 16'h0;
  int          req_cycle = -1, req_gap_ok = 0, req_n = 0, cyc = 0;
  bit          prev_req_4k = 1'b0;
  always @(posedge AudioClock) begin
    cyc++;
    PCM_InValid <= 1'b0;
    if (!AudioReset && PCM_InRequest) begin
      logic [31:0] s;
      s = {16'hC000 | pcm_n, 16'h3000 | pcm_n};
      PCM_InValid <= 1'b1;
      PCM_DIn     <= s;
      pcm_sent.push_back(s);
      pcm_n = pcm_n + 1;
      req_n++;
      if (codec.regs[7'h2A][0] && codec.regs[7'h2C] == 16'd4000) begin
        if (prev_req_4k) begin
          check(cyc - req_cycle == 12 * 256, $sformatf("PCM request gap %0d", cyc - req_cycle));
          req_gap_ok++;
        end
        prev_req_4k = 1'b1;
      end
      req_cycle = cyc;
    end
  end

  // ---- recorded samples ----
  int rec_n = 0, rec_gap_checked = 0, last_rec = -1;
  always @(posedge AudioClock) begin
    if (!AudioReset && PCM_OutValid) begin
      logic [31:0] exp_s;
      if (codec.adc_sent.size() == 0) check(0, "recorded sample with none sent");
      else begin
        exp_s = codec.adc_sent.pop_front();
        check(PCM_DOut == exp_s, $sformatf("PCM_DOut %h expected %h", PCM_DOut, exp_s));
      end
      if (last_rec >= 0 && !codec.regs[7'h2A][0]) begin
        check(cyc - last_rec == 256, $sformatf("recorded sample gap %0d", cyc - last_rec));
        rec_gap_checked++;
      end
      last_rec = cyc;
      rec_n++;
    end
  end

  // ---- watchdog ----
  initial begin
    #3ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge Clock);
    Reset <= 1'b0;
    // run for 60 frames after the codec clock starts
    wait (AP_RESET_ === 1'b0);
    wait (AP_RESET_ === 1'b1);
    repeat (60 * 256) @(posedge AP_BIT_CLOCK);

    check(codec.reset_pulses == 1, "one codec reset pulse");
    check(codec.short_resets == 0, "codec reset pulse at least 1 us");
    check(codec.premature == 0, "no valid frame before codec ready");
    check(codec.sync_err == 0, "sync high for 16 bit times");
    check(codec.proto_err == 0, "frames well formed");
    check(codec.unrequested == 0, "PCM only in requested frames");
    check(codec.valid_frames > 40, "valid frames sent");
    check(AP_PC_BEEP == 1'b0, "PC beep tied low");
    check(codec.writes == NCMD, $sformatf("register writes %0d", codec.writes));
    for (int i = 0; i < NCMD && i < codec.wr_addr.size(); i++) begin
      check(codec.wr_addr[i] == cmd_a[i] && codec.wr_data[i] == cmd_d[i],
            $sformatf("write %0d: %h=%h", i, codec.wr_addr[i], codec.wr_data[i]));
    end
    check(codec.pcm_rx > 5 && codec.pcm_rx == pcm_sent.size() - (PCM_InValid ? 1 : 0) ||
          codec.pcm_rx == pcm_sent.size(),
          $sformatf("PCM samples sent %0d received %0d", pcm_sent.size(), codec.pcm_rx));
    for (int i = 0; i < codec.dac_got.size(); i++)
      check(codec.dac_got[i] == pcm_sent[i],
            $sformatf("PCM %0d got %h sent %h", i, codec.dac_got[i], pcm_sent[i]));
    check(rec_n > 10, $sformatf("recorded samples %0d", rec_n));
    check(rec_gap_checked > 5, "48 kHz recorded sample rate seen");
    check(req_gap_ok >= 2, "4 kHz PCM request rate seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
