// tb_full_volume_control: requests register writes for several switch
// settings and checks each answer: CMD_OutValid exactly one cycle after each
// request and never otherwise, nine different registers per pass in a fixed
// rotation, and the data of each against the LM4549A field layout worked out
// here (5-bit attenuation = 31 - SpeakerVolume in both channels with the
// mute in bit 15, record gain = MicVolume / 2 in bits 11:8 and 3:0, rates
// 4000, VRA on, record source 0).
module tb_full_volume_control;
  logic [4:0]  SpeakerVolume, MicVolume;
  logic        SpeakerMute, MicMute, CMD_OutValid, CMD_OutRequest;
  logic        AudioReset = 1'b1, AudioClock = 1'b0;
  logic [6:0]  CMD_AOut;
  logic [15:0] CMD_DOut;
  int checks = 0, failures = 0;

  full_volume_control dut (.*);

  always #40ns AudioClock = ~AudioClock;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] expect_data(logic [6:0] a);
    logic [4:0] att;
    logic [3:0] g;
    att = 5'd31 - SpeakerVolume;
    g   = MicVolume >> 1;
    case (a)
      7'h2A: return 16'h0001;
      7'h2C, 7'h32: return 16'h0FA0;
      7'h1A: return 16'h0000;
      7'h02, 7'h04, 7'h18, 7'h10:
        return (16'(SpeakerMute) << 15) | (16'(att) << 8) | 16'(att);
      7'h1C: return (16'(MicMute) << 15) | (16'(g) << 8) | 16'(g);
      default: return 16'hDEAD;
    endcase
  endfunction

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] seen [$];
    logic [6:0] first_pass [9];
    CMD_OutRequest = 0;
    SpeakerVolume = 5'd20; SpeakerMute = 0; MicVolume = 5'd9; MicMute = 1;
    repeat (3) @(posedge AudioClock);
    AudioReset <= 1'b0;
    for (int r = 0; r < 45; r++) begin
      if (r % 9 == 0 && r > 0) begin
        SpeakerVolume = 5'($urandom); SpeakerMute = 1'($urandom);
        MicVolume = 5'($urandom); MicMute = 1'($urandom);
      end
      // a few idle cycles: no answer without a request
      repeat (3) begin
        @(negedge AudioClock);
        check(!CMD_OutValid, "no valid without request");
      end
      CMD_OutRequest = 1;
      @(negedge AudioClock);
      CMD_OutRequest = 0;
      check(CMD_OutValid, "valid one cycle after request");
      check(CMD_DOut == expect_data(CMD_AOut),
            $sformatf("reg %h data %h expected %h", CMD_AOut, CMD_DOut, expect_data(CMD_AOut)));
      if (r < 9) first_pass[r] = CMD_AOut;
      else check(CMD_AOut == first_pass[r % 9], "fixed rotation");
      @(negedge AudioClock);
      check(!CMD_OutValid, "valid lasts one cycle");
    end
    // all nine registers distinct
    for (int i = 0; i < 9; i++)
      for (int j = i + 1; j < 9; j++)
        check(first_pass[i] != first_pass[j], "distinct registers in a pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
