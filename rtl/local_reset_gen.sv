// local_reset_gen: reset generator for logic clocked by a clock that an
// external chip produces and stops while it is held in reset.
//
// The AC97 codec drives AP_BIT_CLOCK and stops it while AP_RESET_ is low, so
// the codec reset cannot be timed with AP_BIT_CLOCK. This block times it with
// the free-running system clock (Clock, clockfreq Hz) instead. A high Reset
// (synchronous to Clock) starts a sequence:
//   PRE     PRE_CYCLES Clock cycles: LocalRegReset already requested
//   CLKRST  LocalClockReset high for ceil(lrcycles * clockfreq /
//           localclockfreq) Clock cycles, i.e. lrcycles periods of the local
//           clock (13 periods of 12.288 MHz, just over the codec's 1 us)
//   POST    POST_CYCLES Clock cycles for the local clock to restart
// LocalRegReset is asserted asynchronously as soon as the sequence starts -
// the local clock may already be stopped - and released synchronously to
// LocalClock through two flip-flops once the sequence has ended and the local
// clock runs again. So it rises before LocalClockReset and falls after it.
// This is the design's only asynchronous logic. The ports, parameters and the
// ordering of the two resets follow the lab handout; the sequence lengths and
// the structure are this design's own.
module local_reset_gen #(
  parameter int unsigned clockfreq      = 27_000_000,
  parameter int unsigned localclockfreq = 12_288_000,
  parameter int unsigned lrcycles       = 13,
  parameter int unsigned PRE_CYCLES     = 4,
  parameter int unsigned POST_CYCLES    = 8
) (
  input  logic Clock,
  input  logic Reset,
  input  logic LocalClock,
  output logic LocalClockReset,
  output logic LocalRegReset
);

  localparam longint unsigned RST_CYCLES =
      (longint'(lrcycles) * longint'(clockfreq) + longint'(localclockfreq) - 1) /
      longint'(localclockfreq);
  localparam int CNT_W = $clog2(RST_CYCLES + longint'(PRE_CYCLES) + longint'(POST_CYCLES) + 1);

  typedef enum logic [1:0] {IDLE, PRE, CLKRST, POST} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic             reg_rst_req;
  logic [1:0]       rr_sync;

  always_ff @(posedge Clock) begin
    if (Reset) begin
      state <= PRE;
      cnt   <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (state)
        PRE:    if (cnt == CNT_W'(PRE_CYCLES - 1))  begin state <= CLKRST; cnt <= '0; end
        CLKRST: if (cnt == CNT_W'(RST_CYCLES - 1))  begin state <= POST;   cnt <= '0; end
        POST:   if (cnt == CNT_W'(POST_CYCLES - 1)) begin state <= IDLE;   cnt <= '0; end
        default: cnt <= '0;
      endcase
    end
  end

  // Registered outputs in the Clock domain, so neither glitches.
  always_ff @(posedge Clock) begin
    if (Reset) begin
      LocalClockReset <= 1'b0;
      reg_rst_req     <= 1'b1;
    end else begin
      LocalClockReset <= (state == CLKRST);
      reg_rst_req     <= (state != IDLE) &&
                         !(state == POST && cnt == CNT_W'(POST_CYCLES - 1));
    end
  end

  // Asynchronous assertion, synchronous release in the LocalClock domain.
  always_ff @(posedge LocalClock or posedge reg_rst_req) begin
    if (reg_rst_req) rr_sync <= 2'b11;
    else             rr_sync <= {rr_sync[0], 1'b0};
  end

  assign LocalRegReset = rr_sync[1];

endmodule
