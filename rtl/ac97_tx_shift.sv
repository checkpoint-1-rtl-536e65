// ac97_tx_shift: slot multiplexer and output shift register of the AC97
// controller.
//
// On tx_load the multiplexer selects the content of slot tx_slot and loads it
// into a 20-bit shift register; on every other rising AP_BIT_CLOCK edge the
// register shifts left. The serial output is the register's MSB, so each slot
// leaves MSB first, one bit per clock, changing on the rising edge (the codec
// samples on the falling edge). The 16-bit tag slot is loaded into the upper
// 16 bits. Slot contents:
//   slot 0  tag
//   slot 1  {read/write bit = 0 (write), 7-bit register address, 12'b0}
//   slot 2  {16-bit register data, 4'b0}
//   slot 3  {left PCM sample, 4'b0}
//   slot 4  {right PCM sample, 4'b0}
//   slots 5..12 zero
// Setting the four low bits of each PCM slot to zero follows the lab handout;
// the slot 1/2 layout is the AC'97 standard's.
module ac97_tx_shift
  import ac97_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 tx_load,
  input  logic [3:0]           tx_slot,
  input  logic [TAG_BITS-1:0]  tag,
  input  logic [6:0]           cmd_addr,
  input  logic [15:0]          cmd_data,
  input  logic [15:0]          pcm_left,
  input  logic [15:0]          pcm_right,
  output logic                 sdata_out
);

  logic [SLOT_BITS-1:0] shreg, slot_word;

  always_comb begin
    unique case (tx_slot)
      4'd0:    slot_word = {tag, 4'b0000};
      4'd1:    slot_word = {1'b0, cmd_addr, 12'b0};
      4'd2:    slot_word = {cmd_data, 4'b0000};
      4'd3:    slot_word = {pcm_left, 4'b0000};
      4'd4:    slot_word = {pcm_right, 4'b0000};
      default: slot_word = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)          shreg <= '0;
    else if (tx_load) shreg <= slot_word;
    else              shreg <= {shreg[SLOT_BITS-2:0], 1'b0};
  end

  assign sdata_out = shreg[SLOT_BITS-1];

endmodule
