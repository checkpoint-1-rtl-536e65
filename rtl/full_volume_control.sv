// full_volume_control: source of the LM4549A register writes.
//
// The codec is configured entirely by register writes sent in slots 1 and 2
// of the outgoing AC97 frames. This block holds the list of writes the audio
// system needs and hands them out one at a time: each CMD_OutRequest pulse
// from the controller is answered on the next AudioClock cycle with a
// one-cycle CMD_OutValid and the address/data of the next entry, which stay
// on CMD_AOut/CMD_DOut until the next request. The list is walked round and
// round, so a change of the volume or mute inputs reaches the codec within
// one pass (NUM_CMDS frames). The data is computed from the inputs at the
// moment of the request.
//
// The list (register: value):
//   2Ah Extended audio control: 0001h, variable rate audio on
//   2Ch PCM DAC rate, 32h PCM ADC rate: SAMPLE_RATE (4000 Hz)
//   1Ah Record select: 0000h (microphone on both channels)
//   02h Master, 04h Line level: mute = SpeakerMute, 5-bit attenuation
//   18h PCM out, 10h Line in: mute = SpeakerMute, 5-bit gain/attenuation
//   1Ch Record gain: mute = MicMute, 4-bit gain
// The LM4549A's attenuation fields count the wrong way for a volume knob
// (0 is loudest), so SpeakerVolume is inverted for them; the record gain
// counts the right way (0 = 0 dB, 15 = +22.5 dB) and takes MicVolume[4:1].
// Which registers are written, the 4 kHz rate and the speaker/mic split
// follow the lab handout; the order, the VRA write and the inversions are this
// design's choices.
module full_volume_control
  import ac97_pkg::*;
#(
  parameter int unsigned SAMPLE_RATE = 4000
) (
  input  logic [4:0]  SpeakerVolume,
  input  logic        SpeakerMute,
  input  logic        MicMute,
  input  logic [4:0]  MicVolume,
  output logic [6:0]  CMD_AOut,
  output logic [15:0] CMD_DOut,
  output logic        CMD_OutValid,
  input  logic        CMD_OutRequest,
  input  logic        AudioReset,
  input  logic        AudioClock
);

  localparam int NUM_CMDS = 9;

  logic [3:0] idx;
  ac97_cmd_t  next_cmd;
  logic [4:0] spk_att;

  assign spk_att = ~SpeakerVolume;

  always_comb begin
    unique case (idx)
      4'd0:    next_cmd = '{REG_EXT_AUDIO_CS, 16'h0001};
      4'd1:    next_cmd = '{REG_PCM_DAC_RATE, 16'(SAMPLE_RATE)};
      4'd2:    next_cmd = '{REG_PCM_ADC_RATE, 16'(SAMPLE_RATE)};
      4'd3:    next_cmd = '{REG_RECORD_SEL,   16'h0000};
      4'd4:    next_cmd = '{REG_MASTER_VOL,   stereo5(SpeakerMute, spk_att, spk_att)};
      4'd5:    next_cmd = '{REG_LINE_LVL_VOL, stereo5(SpeakerMute, spk_att, spk_att)};
      4'd6:    next_cmd = '{REG_PCM_OUT_VOL,  stereo5(SpeakerMute, spk_att, spk_att)};
      4'd7:    next_cmd = '{REG_LINE_IN_VOL,  stereo5(SpeakerMute, spk_att, spk_att)};
      default: next_cmd = '{REG_RECORD_GAIN,  stereo4(MicMute, MicVolume[4:1], MicVolume[4:1])};
    endcase
  end

  always_ff @(posedge AudioClock) begin
    if (AudioReset) begin
      idx          <= '0;
      CMD_AOut     <= '0;
      CMD_DOut     <= '0;
      CMD_OutValid <= 1'b0;
    end else begin
      CMD_OutValid <= CMD_OutRequest;
      if (CMD_OutRequest) begin
        CMD_AOut <= next_cmd.addr;
        CMD_DOut <= next_cmd.data;
        idx      <= (idx == 4'(NUM_CMDS - 1)) ? '0 : idx + 1'b1;
      end
    end
  end

endmodule
