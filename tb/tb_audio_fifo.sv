// tb_audio_fifo: random writes and reads on a 16-entry FIFO checked against
// a queue model: data order, one-cycle read latency, full and empty flags,
// count, writes dropped when full, reads ignored when empty, and clear.
module tb_audio_fifo;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic clear, wr_en, rd_en, full, empty;
  logic [15:0] din, dout;
  logic [4:0]  count;
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;

  audio_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  always #5ns clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q [$];
    logic        expect_rd;
    logic [15:0] expect_val;
    clear = 0; wr_en = 0; rd_en = 0; din = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    expect_rd = 0;
    for (int i = 0; i < 3000; i++) begin
      int phase;
      @(negedge clk);
      if (expect_rd) check(dout == expect_val, $sformatf("dout %h expected %h", dout, expect_val));
      check(count == 5'(q.size()), $sformatf("count %0d expected %0d", count, q.size()));
      check(full == (q.size() == DEPTH), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      phase = (i / 300) % 3;        // fill-heavy, drain-heavy, balanced
      wr_en = ($urandom % 100) < (phase == 0 ? 80 : phase == 1 ? 20 : 50);
      rd_en = ($urandom % 100) < (phase == 0 ? 20 : phase == 1 ? 80 : 50);
      clear = (i == 2500);
      din   = 16'($urandom);
      expect_rd = 0;
      if (clear) begin
        q.delete();
      end else begin
        if (rd_en && q.size() > 0) begin expect_rd = 1; expect_val = q.pop_front(); end
        else if (rd_en) n_empty_rd++;
        if (wr_en && q.size() + (expect_rd ? 1 : 0) < DEPTH) q.push_back(din);
        else if (wr_en) n_full++;
      end
    end
    check(n_full > 0, "writes to a full FIFO exercised");
    check(n_empty_rd > 0, "reads from an empty FIFO exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
