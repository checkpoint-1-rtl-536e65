// audio_fifo: the audio buffer, a single-clock FIFO of 16-bit samples.
//
// DEPTH entries of WIDTH bits in a memory array (block RAM on an FPGA) with
// read and write pointers one bit wider than the address, so full and empty
// are told apart by the extra bit. A write with wr_en stores din unless the
// FIFO is full; a read with rd_en takes the oldest entry unless it is empty,
// and the entry appears on dout on the next clock edge (dout holds it until
// the next read). clear empties the FIFO. The default depth, 32768 samples,
// holds 8.2 seconds of audio at the 4 kHz sample rate; the lab handout asks for
// "roughly 8 seconds" of 16-bit samples, the exact depth is this design's.
// DEPTH must be a power of two.
module audio_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 32768
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         din,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign count = wr_ptr - rd_ptr;
  assign empty = (wr_ptr == rd_ptr);
  assign full  = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= din;
    if (do_rd) dout <= mem[rd_ptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

endmodule
