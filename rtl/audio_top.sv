// audio_top: record-and-playback audio system around the LM4549A AC97 codec.
//
// The AC97 controller talks to the codec over its five-wire link; the
// volume control feeds it the codec's register writes (volumes from the
// speaker and microphone switch settings, 4 kHz variable sample rate); the
// record/playback control moves the left channel of recorded samples into
// the 16-bit audio FIFO on the record button and sends them back to both
// channels on the play button. Everything except the reset generator inside
// the controller runs on AudioClock (AP_BIT_CLOCK); Clock is the 27 MHz
// board clock and Reset is synchronous to it. Interfaces: the codec pins,
// the volume/mute switch inputs and two push buttons. The partition follows
// the lab handout's suggested organisation; the status outputs are this
// design's own.
module audio_top #(
  parameter int unsigned clockfreq      = 27_000_000,
  parameter int unsigned localclockfreq = 12_288_000,
  parameter int unsigned lrcycles       = 13,
  parameter int unsigned SAMPLE_RATE    = 4000,
  parameter int unsigned FIFO_DEPTH     = 32768
) (
  input  logic       Clock,
  input  logic       Reset,
  // LM4549A pins
  output logic       AP_SDATA_OUT,
  input  logic       AP_BIT_CLOCK,
  input  logic       AP_SDATA_IN,
  output logic       AP_SYNC,
  output logic       AP_RESET_,
  output logic       AP_PC_BEEP,
  // switches and buttons
  input  logic [4:0] SpeakerVolume,
  input  logic       SpeakerMute,
  input  logic [4:0] MicVolume,
  input  logic       MicMute,
  input  logic       RecordButton,       // SW2
  input  logic       PlayButton,         // SW3
  // status
  output logic       Recording,
  output logic       Playing,
  output logic       BufferFull,
  output logic       BufferEmpty
);

  logic        audio_clock, audio_reset;
  logic [31:0] pcm_play, pcm_rec;
  logic        pcm_play_valid, pcm_play_req, pcm_rec_valid;
  logic [6:0]  cmd_addr;
  logic [15:0] cmd_data;
  logic        cmd_valid, cmd_req;
  logic        fifo_clear, fifo_wr, fifo_rd;
  logic [15:0] fifo_din, fifo_dout;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  ac97_controller #(
    .clockfreq(clockfreq), .localclockfreq(localclockfreq), .lrcycles(lrcycles)
  ) u_ac97 (
    .AP_SDATA_OUT(AP_SDATA_OUT), .AP_BIT_CLOCK(AP_BIT_CLOCK),
    .AP_SDATA_IN(AP_SDATA_IN), .AP_SYNC(AP_SYNC), .AP_RESET_(AP_RESET_),
    .AP_PC_BEEP(AP_PC_BEEP), .Reset(Reset), .Clock(Clock),
    .PCM_DIn(pcm_play), .PCM_InValid(pcm_play_valid), .PCM_InRequest(pcm_play_req),
    .PCM_DOut(pcm_rec), .PCM_OutValid(pcm_rec_valid),
    .CMD_AIn(cmd_addr), .CMD_DIn(cmd_data), .CMD_InValid(cmd_valid),
    .CMD_InRequest(cmd_req), .AudioReset(audio_reset), .AudioClock(audio_clock)
  );

  full_volume_control #(.SAMPLE_RATE(SAMPLE_RATE)) u_volume (
    .SpeakerVolume(SpeakerVolume), .SpeakerMute(SpeakerMute),
    .MicMute(MicMute), .MicVolume(MicVolume),
    .CMD_AOut(cmd_addr), .CMD_DOut(cmd_data), .CMD_OutValid(cmd_valid),
    .CMD_OutRequest(cmd_req), .AudioReset(audio_reset), .AudioClock(audio_clock)
  );

  record_playback u_recplay (
    .clk(audio_clock), .rst(audio_reset),
    .record_btn(RecordButton), .play_btn(PlayButton),
    .PCM_DOut(pcm_rec), .PCM_OutValid(pcm_rec_valid),
    .PCM_InRequest(pcm_play_req), .PCM_DIn(pcm_play), .PCM_InValid(pcm_play_valid),
    .fifo_clear(fifo_clear), .fifo_wr(fifo_wr), .fifo_din(fifo_din),
    .fifo_rd(fifo_rd), .fifo_dout(fifo_dout), .fifo_full(BufferFull),
    .fifo_empty(BufferEmpty), .recording(Recording), .playing(Playing)
  );

  audio_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(audio_clock), .rst(audio_reset), .clear(fifo_clear),
    .wr_en(fifo_wr), .din(fifo_din), .rd_en(fifo_rd), .dout(fifo_dout),
    .full(BufferFull), .empty(BufferEmpty), .count(fifo_count)
  );

endmodule
