// ac97_pkg: constants and helper functions shared by the AC97 link blocks.
//
// An AC97 frame is 256 bit clocks long: a 16-bit tag slot (slot 0) followed
// by twelve 20-bit slots (12*20 + 16 = 256). Every slot is sent MSB first.
// The controller keeps a bit counter that runs 0..255; while the counter is n
// the output shift register presents frame bit n. The I/O register adds one
// cycle on the way out and one on the way in, and the codec answers on the
// edge on which it first sees sync, so incoming frame bit n reaches the
// controller while the counter is n + RX_DELAY.
//
// Register addresses and field layouts follow the LM4549A register map. The
// command-slot layout (read/write bit in slot 1 bit 19, address in bits 18:12,
// data in slot 2 bits 19:4) and the slot-request bits of incoming slot 1 are
// taken from the AC'97 standard; the frame sizes and the sync/load timing
// follow the lab handout.
package ac97_pkg;

  localparam int FRAME_BITS = 256;
  localparam int TAG_BITS   = 16;
  localparam int SLOT_BITS  = 20;
  localparam int NUM_SLOTS  = 13;          // slot 0 (tag) and slots 1..12
  localparam int CNT_W      = 8;           // log2(FRAME_BITS)

  // Cycles from "counter shows frame bit n" to "incoming frame bit n is at the
  // controller": one for the outgoing I/O register (sync), one for the
  // incoming I/O register.
  localparam int RX_DELAY   = 2;

  // Cycle of the frame on which the controller asks its command and PCM
  // sources for the next frame's data, and the last cycle an answer is taken.
  localparam int REQ_CNT    = 250;
  localparam int RESP_LAST  = 254;

  // Tag bits (slot 0).
  localparam int TAG_VALID_FRAME = 15;     // outgoing: frame valid; incoming: codec ready
  localparam int TAG_SLOT1       = 14;
  localparam int TAG_SLOT2       = 13;
  localparam int TAG_SLOT3       = 12;     // PCM left
  localparam int TAG_SLOT4       = 11;     // PCM right

  // Incoming slot 1: slot request bits, active low (AC'97 SLOTREQ).
  localparam int SLOTREQ3 = 11;
  localparam int SLOTREQ4 = 10;

  // LM4549A register addresses (7-bit).
  typedef enum logic [6:0] {
    REG_RESET        = 7'h00,
    REG_MASTER_VOL   = 7'h02,
    REG_LINE_LVL_VOL = 7'h04,
    REG_MONO_VOL     = 7'h06,
    REG_PC_BEEP_VOL  = 7'h0A,
    REG_PHONE_VOL    = 7'h0C,
    REG_MIC_VOL      = 7'h0E,
    REG_LINE_IN_VOL  = 7'h10,
    REG_CD_VOL       = 7'h12,
    REG_VIDEO_VOL    = 7'h14,
    REG_AUX_VOL      = 7'h16,
    REG_PCM_OUT_VOL  = 7'h18,
    REG_RECORD_SEL   = 7'h1A,
    REG_RECORD_GAIN  = 7'h1C,
    REG_GENERAL      = 7'h20,
    REG_POWERDOWN    = 7'h26,
    REG_EXT_AUDIO_ID = 7'h28,
    REG_EXT_AUDIO_CS = 7'h2A,
    REG_PCM_DAC_RATE = 7'h2C,
    REG_PCM_ADC_RATE = 7'h32
  } ac97_reg_e;

  // A register write as handed from the volume control to the controller.
  typedef struct packed {
    logic [6:0]  addr;
    logic [15:0] data;
  } ac97_cmd_t;

  // First counter value of slot s (s = 0..12).
  function automatic int slot_first_bit(int s);
    return (s == 0) ? 0 : TAG_BITS + SLOT_BITS * (s - 1);
  endfunction

  // Last counter value of slot s.
  function automatic int slot_last_bit(int s);
    return TAG_BITS - 1 + SLOT_BITS * s;
  endfunction

  // Counter value on which slot s is loaded into the output shift register:
  // the cycle before its first bit is presented.
  function automatic int tx_load_cnt(int s);
    return (slot_first_bit(s) + FRAME_BITS - 1) % FRAME_BITS;
  endfunction

  // Counter value on which the last bit of incoming slot s is at the
  // controller's input.
  function automatic int rx_capture_cnt(int s);
    return (slot_last_bit(s) + RX_DELAY) % FRAME_BITS;
  endfunction

  // Stereo register with a mute bit (D15) and two 5-bit fields (D12:8, D4:0).
  function automatic logic [15:0] stereo5(logic mute, logic [4:0] l, logic [4:0] r);
    return {mute, 2'b00, l, 3'b000, r};
  endfunction

  // Stereo register with a mute bit (D15) and two 4-bit fields (D11:8, D3:0).
  function automatic logic [15:0] stereo4(logic mute, logic [3:0] l, logic [3:0] r);
    return {mute, 3'b000, l, 4'b0000, r};
  endfunction

endpackage
