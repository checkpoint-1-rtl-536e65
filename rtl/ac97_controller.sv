// ac97_controller: AC97 link controller for the LM4549A codec.
//
// At its core a parallel-to-serial converter: register writes and 32-bit PCM
// samples go out as 256-bit AC97 frames on AP_SDATA_OUT, and the codec's
// frames on AP_SDATA_IN are taken apart into codec status and recorded 32-bit
// samples. Everything runs on AP_BIT_CLOCK (12.288 MHz, made by the codec),
// which is also brought out as AudioClock.
//
// Parts: local_reset_gen times the codec reset AP_RESET_ with the free-running
// 27 MHz Clock and makes AudioReset for the bit-clock domain; ac97_bit_count
// counts the frame's bit times and decodes sync and the slot strobes;
// ac97_tx_shift (slot multiplexer + output shift register) and ac97_rx_shift
// (input shift register) do the serial conversion; io_register puts sync and
// both data lines through one register at the pads. The control logic here:
//   * CodecReady is bit 15 of the incoming tag. Until it is 1, outgoing frames
//     are all zero and nothing is requested.
//   * On bit time 250 of each frame CMD_InRequest pulses, and PCM_InRequest
//     pulses if the codec asked for slots 3 and 4 in the slot-request bits of
//     the last incoming slot 1 (active low; with variable-rate audio the codec
//     asks only at its sample rate). A source answers with a one-cycle
//     CMD_InValid / PCM_InValid within bit times 251..254 (the cycle after the
//     request is typical); the answer is held and sent in the next frame, and
//     the tag marks slots 1+2 / 3+4 valid only if an answer came.
//   * Tag: bit 15 frame valid (= CodecReady), 14/13 command slots, 12/11 PCM
//     slots, bits 10..0 zero. PCM_DIn[31:16] goes to slot 3 (left), [15:0] to
//     slot 4 (right), each with four zero low bits.
//   * Incoming slots 3 and 4 drop their four low bits and form PCM_DOut; if
//     both are tagged valid, PCM_OutValid pulses one cycle after slot 4 ends.
// Sync is high for 16 bit times, rising on the same cycle as slot 0 is loaded
// into the output shift register, so the codec samples it high on every edge
// on which a slot-0 bit leaves. The framing, sync timing, tag rules, CodecReady
// and the PCM bit handling follow the lab handout; the request cycle and answer
// window, and the use of the slot-request bits, are this design's choices.
// AP_PC_BEEP is tied low, as the lab handout asks.
module ac97_controller
  import ac97_pkg::*;
#(
  parameter int unsigned clockfreq      = 27_000_000,
  parameter int unsigned localclockfreq = 12_288_000,
  parameter int unsigned lrcycles       = 13
) (
  // LM4549A pins
  output logic        AP_SDATA_OUT,
  input  logic        AP_BIT_CLOCK,
  input  logic        AP_SDATA_IN,
  output logic        AP_SYNC,
  output logic        AP_RESET_,
  output logic        AP_PC_BEEP,
  // system clock and reset
  input  logic        Reset,
  input  logic        Clock,
  // samples to play
  input  logic [31:0] PCM_DIn,
  input  logic        PCM_InValid,
  output logic        PCM_InRequest,
  // recorded samples
  output logic [31:0] PCM_DOut,
  output logic        PCM_OutValid,
  // register writes
  input  logic [6:0]  CMD_AIn,
  input  logic [15:0] CMD_DIn,
  input  logic        CMD_InValid,
  output logic        CMD_InRequest,
  // bit-clock domain
  output logic        AudioReset,
  output logic        AudioClock
);

  logic             local_clock_reset;
  logic [CNT_W-1:0] bit_cnt;
  logic             sync, tx_load, rx_capture, req, resp;
  logic [3:0]       tx_slot, rx_slot;
  logic             sdata_out, sdata_in_q;
  logic [TAG_BITS-1:0]  rx_tag, tx_tag;
  logic [SLOT_BITS-1:0] rx_slot1, rx_slot3, rx_slot4;
  logic             rx_tag_done, rx_pcm_done;
  logic             codec_ready, pcm_wanted;
  logic             cmd_ok, pcm_ok;
  ac97_cmd_t        cmd;
  logic [31:0]      pcm_out;

  assign AudioClock = AP_BIT_CLOCK;
  assign AP_RESET_  = ~local_clock_reset;
  assign AP_PC_BEEP = 1'b0;

  local_reset_gen #(
    .clockfreq(clockfreq), .localclockfreq(localclockfreq), .lrcycles(lrcycles)
  ) u_reset (
    .Clock(Clock), .Reset(Reset), .LocalClock(AP_BIT_CLOCK),
    .LocalClockReset(local_clock_reset), .LocalRegReset(AudioReset)
  );

  ac97_bit_count u_count (
    .clk(AudioClock), .rst(AudioReset), .bit_cnt(bit_cnt), .sync(sync),
    .tx_load(tx_load), .tx_slot(tx_slot), .rx_capture(rx_capture),
    .rx_slot(rx_slot), .req(req), .resp(resp)
  );

  ac97_tx_shift u_tx (
    .clk(AudioClock), .rst(AudioReset), .tx_load(tx_load), .tx_slot(tx_slot),
    .tag(tx_tag), .cmd_addr(cmd.addr), .cmd_data(cmd.data),
    .pcm_left(pcm_out[31:16]), .pcm_right(pcm_out[15:0]), .sdata_out(sdata_out)
  );

  ac97_rx_shift u_rx (
    .clk(AudioClock), .rst(AudioReset), .sdata_in(sdata_in_q),
    .rx_capture(rx_capture), .rx_slot(rx_slot), .tag(rx_tag), .slot1(rx_slot1),
    .slot3(rx_slot3), .slot4(rx_slot4), .tag_done(rx_tag_done),
    .pcm_done(rx_pcm_done)
  );

  io_register #(.WIDTH(3)) u_io (
    .clk(AudioClock),
    .d({sync, sdata_out, AP_SDATA_IN}),
    .q({AP_SYNC, AP_SDATA_OUT, sdata_in_q})
  );

  // ---- control ----
  assign codec_ready   = rx_tag[TAG_VALID_FRAME];
  assign pcm_wanted    = !rx_slot1[SLOTREQ3] && !rx_slot1[SLOTREQ4];
  assign CMD_InRequest = req && codec_ready;
  assign PCM_InRequest = req && codec_ready && pcm_wanted;

  always_comb begin
    tx_tag                  = '0;
    tx_tag[TAG_VALID_FRAME] = codec_ready;
    tx_tag[TAG_SLOT1]       = cmd_ok;
    tx_tag[TAG_SLOT2]       = cmd_ok;
    tx_tag[TAG_SLOT3]       = pcm_ok;
    tx_tag[TAG_SLOT4]       = pcm_ok;
  end

  always_ff @(posedge AudioClock) begin
    if (AudioReset) begin
      cmd_ok  <= 1'b0;
      pcm_ok  <= 1'b0;
      cmd     <= '0;
      pcm_out <= '0;
    end else if (req) begin
      cmd_ok  <= 1'b0;
      pcm_ok  <= 1'b0;
    end else if (resp) begin
      if (CMD_InValid) begin
        cmd_ok <= 1'b1;
        cmd    <= '{CMD_AIn, CMD_DIn};
      end
      if (PCM_InValid) begin
        pcm_ok  <= 1'b1;
        pcm_out <= PCM_DIn;
      end
    end
  end

  always_ff @(posedge AudioClock) begin
    if (AudioReset) begin
      PCM_DOut     <= '0;
      PCM_OutValid <= 1'b0;
    end else begin
      PCM_OutValid <= rx_pcm_done && codec_ready &&
                      rx_tag[TAG_SLOT3] && rx_tag[TAG_SLOT4];
      if (rx_pcm_done)
        PCM_DOut <= {rx_slot3[SLOT_BITS-1:4], rx_slot4[SLOT_BITS-1:4]};
    end
  end

  // Handshake rule: answers come only inside the answer window.
  a_cmd_in_window: assert property (@(posedge AudioClock) disable iff (AudioReset)
                                    CMD_InValid |-> resp);
  a_pcm_in_window: assert property (@(posedge AudioClock) disable iff (AudioReset)
                                    PCM_InValid |-> resp);

endmodule
