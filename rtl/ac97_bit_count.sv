// ac97_bit_count: frame bit counter and the decoders driven by it.
//
// A free-running 8-bit counter steps through the 256 bit times of an AC97
// frame on every rising AP_BIT_CLOCK edge. While the counter reads n, the
// output shift register presents frame bit n. The decoders derive from it:
//   sync       - high for 16 of the 256 cycles: the cycle before slot 0 and
//                the first 15 bits of slot 0 (counter 255, 0..14), so that
//                after the I/O register the codec samples sync high on each
//                edge on which a slot-0 bit is sent. Combinational; the I/O
//                register that follows registers it.
//   tx_load    - the cycle before a slot's first bit: load the output shift
//                register with slot tx_slot (slot 0 at counter 255, which is
//                the same cycle sync first goes high).
//   rx_capture - the cycle on which the last bit of incoming slot rx_slot is
//                at the controller input (RX_DELAY cycles after it was sent).
//   req        - the cycle on which the controller asks its sources for the
//                next frame's command and PCM data.
//   resp       - the cycles after req on which an answer is accepted.
// The 16-cycle sync and the load-with-sync rule follow the lab handout; the
// request cycle and answer window are this design's choice.
module ac97_bit_count
  import ac97_pkg::*;
(
  input  logic             clk,        // AP_BIT_CLOCK
  input  logic             rst,        // synchronous, active high
  output logic [CNT_W-1:0] bit_cnt,
  output logic             sync,
  output logic             tx_load,
  output logic [3:0]       tx_slot,
  output logic             rx_capture,
  output logic [3:0]       rx_slot,
  output logic             req,
  output logic             resp
);

  // Reset to 254 so that the first frame (slot 0 load at 255) starts one
  // cycle after reset is released.
  always_ff @(posedge clk) begin
    if (rst) bit_cnt <= CNT_W'(FRAME_BITS - 2);
    else     bit_cnt <= bit_cnt + 1'b1;
  end

  always_comb begin
    sync       = (bit_cnt == CNT_W'(FRAME_BITS - 1)) || (bit_cnt < CNT_W'(TAG_BITS - 1));
    tx_load    = 1'b0;
    tx_slot    = '0;
    rx_capture = 1'b0;
    rx_slot    = '0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      if (bit_cnt == CNT_W'(tx_load_cnt(s))) begin
        tx_load = 1'b1;
        tx_slot = 4'(s);
      end
      if (bit_cnt == CNT_W'(rx_capture_cnt(s))) begin
        rx_capture = 1'b1;
        rx_slot    = 4'(s);
      end
    end
    req  = (bit_cnt == CNT_W'(REQ_CNT));
    resp = (bit_cnt > CNT_W'(REQ_CNT)) && (bit_cnt <= CNT_W'(RESP_LAST));
  end

endmodule
