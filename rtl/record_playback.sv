// record_playback: records microphone samples into the audio FIFO and plays
// them back.
//
// Pressing the record button (SW2) empties the FIFO and enters RECORD: every
// recorded sample the AC97 controller delivers (PCM_OutValid) has its left
// channel, PCM_DOut[31:16], written to the 16-bit FIFO until the FIFO is
// full, which ends the recording. Pressing the play button (SW3) enters PLAY:
// each PCM_InRequest from the controller pops one sample, which is answered
// on the next cycle with PCM_InValid and the sample duplicated into both
// channels of PCM_DIn (mono). A request that finds the FIFO empty ends the
// playback and is not answered, so the controller marks that frame's PCM
// slots invalid. Pressing play during a recording ends it and starts the
// playback. Buttons are synchronised to AudioClock with two flip-flops and
// act on their rising edge.
// Left-channel recording, mono playback and the button roles follow the
// lab handout; the states and end conditions are this design's.
module record_playback (
  input  logic        clk,             // AudioClock
  input  logic        rst,             // AudioReset
  input  logic        record_btn,      // SW2, asynchronous
  input  logic        play_btn,        // SW3, asynchronous
  // AC97 controller, recorded samples
  input  logic [31:0] PCM_DOut,
  input  logic        PCM_OutValid,
  // AC97 controller, samples to play
  input  logic        PCM_InRequest,
  output logic [31:0] PCM_DIn,
  output logic        PCM_InValid,
  // audio FIFO
  output logic        fifo_clear,
  output logic        fifo_wr,
  output logic [15:0] fifo_din,
  output logic        fifo_rd,
  input  logic [15:0] fifo_dout,
  input  logic        fifo_full,
  input  logic        fifo_empty,
  // status
  output logic        recording,
  output logic        playing
);

  typedef enum logic [1:0] {IDLE, RECORD, PLAY} mode_e;

  mode_e      mode;
  logic [2:0] rec_s, play_s;           // two sync stages and the previous value
  logic       rec_press, play_press;

  always_ff @(posedge clk) begin
    if (rst) begin
      rec_s  <= '0;
      play_s <= '0;
    end else begin
      rec_s  <= {rec_s[1:0], record_btn};
      play_s <= {play_s[1:0], play_btn};
    end
  end

  assign rec_press  = rec_s[1]  && !rec_s[2];
  assign play_press = play_s[1] && !play_s[2];

  assign fifo_din = PCM_DOut[31:16];
  assign PCM_DIn  = {fifo_dout, fifo_dout};

  always_comb begin
    fifo_clear = rec_press && !play_press;
    fifo_wr    = (mode == RECORD) && PCM_OutValid && !fifo_full;
    fifo_rd    = (mode == PLAY) && PCM_InRequest && !fifo_empty;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mode        <= IDLE;
      PCM_InValid <= 1'b0;
    end else begin
      PCM_InValid <= fifo_rd;
      if (play_press) mode <= PLAY;
      else if (rec_press) mode <= RECORD;
      else begin
        unique case (mode)
          RECORD: if (fifo_full) mode <= IDLE;
          PLAY:   if (PCM_InRequest && fifo_empty) mode <= IDLE;
          default: ;
        endcase
      end
    end
  end

  assign recording = (mode == RECORD);
  assign playing   = (mode == PLAY);

endmodule
