// ac97_rx_shift: input shift register of the AC97 controller.
//
// Every rising AP_BIT_CLOCK edge shifts the (I/O-registered) serial input into
// bit 0 of a 20-bit shift register. On rx_capture the slot that is just
// complete - the register's low bits plus the bit at the input now - is
// copied to a holding register: the tag (slot 0), slot 1 (status address and
// slot-request bits) and the PCM slots 3 (left) and 4 (right). Other slots
// are not kept. tag_done / pcm_done pulse for one cycle after the tag / slot 4
// has been captured. The codec-ready flag is bit 15 of the captured tag, the
// first bit of the incoming frame. Interface timing: outputs change on the
// edge that ends the capture cycle. Rising-edge sampling and codec ready in the
// first incoming bit follow the lab handout; which slots are kept is this
// design's choice.
module ac97_rx_shift
  import ac97_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sdata_in,
  input  logic                 rx_capture,
  input  logic [3:0]           rx_slot,
  output logic [TAG_BITS-1:0]  tag,
  output logic [SLOT_BITS-1:0] slot1,
  output logic [SLOT_BITS-1:0] slot3,
  output logic [SLOT_BITS-1:0] slot4,
  output logic                 tag_done,
  output logic                 pcm_done
);

  logic [SLOT_BITS-1:0] shreg, word;

  assign word = {shreg[SLOT_BITS-2:0], sdata_in};

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg    <= '0;
      tag      <= '0;
      slot1    <= '0;
      slot3    <= '0;
      slot4    <= '0;
      tag_done <= 1'b0;
      pcm_done <= 1'b0;
    end else begin
      shreg    <= word;
      tag_done <= 1'b0;
      pcm_done <= 1'b0;
      if (rx_capture) begin
        unique case (rx_slot)
          4'd0: begin tag   <= word[TAG_BITS-1:0]; tag_done <= 1'b1; end
          4'd1:       slot1 <= word;
          4'd3:       slot3 <= word;
          4'd4: begin slot4 <= word; pcm_done <= 1'b1; end
          default: ;
        endcase
      end
    end
  end

endmodule
