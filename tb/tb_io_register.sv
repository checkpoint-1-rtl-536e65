// tb_io_register: random words through a 3-bit I/O register; each must
// appear on q exactly one clock later.
module tb_io_register;
  logic clk = 1'b0;
  logic [2:0] d, q, prev;
  int checks = 0, failures = 0;

  io_register #(.WIDTH(3)) dut (.clk(clk), .d(d), .q(q));

  always #5ns clk = ~clk;

  initial begin
    #10us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 3'b000;
    @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      prev = d;
      d = 3'($urandom);
      checks++;
      if (q !== prev) begin failures++; $display("FAIL: q %b expected %b", q, prev); end
      @(posedge clk); #1ns;
      checks++;
      if (q !== d) begin failures++; $display("FAIL: q %b after edge expected %b", q, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
