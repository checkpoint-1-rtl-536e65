// io_register: the register that sits at the very edge of the FPGA on every
// signal between the AC97 controller and the codec.
//
// It is a plain positive-edge register, WIDTH bits wide, that delays each
// signal by one AP_BIT_CLOCK cycle. Its purpose is timing: with the flip-flops
// placed in the I/O blocks (the syn_useioff attribute asks the place-and-route
// tools for that), the clock-to-pad and pad-to-clock delays are fixed and
// small. It has no reset, as I/O flip-flops usually do not; the controller
// resets the values it feeds in. The register and its placement in the I/O
// blocks follow the lab handout; the width and the missing reset are this
// design's.
module io_register #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  (* syn_useioff = 1 *) logic [WIDTH-1:0] q_r;

  always_ff @(posedge clk) q_r <= d;

  assign q = q_r;

endmodule
