// tb_ac97_tx_shift: loads random slot contents at the frame's slot
// boundaries and rebuilds the serial stream bit by bit. Each slot must come
// out MSB first with the expected layout: tag in 16 bits, slot 1 = {0, addr,
// 12'b0}, slot 2 = {data, 4'b0}, slots 3/4 = {sample, 4'b0}, the rest zero.
module tb_ac97_tx_shift;
  logic clk = 1'b0, rst = 1'b1;
  logic tx_load, sdata_out;
  logic [3:0] tx_slot;
  logic [15:0] tag, cmd_data, pcm_left, pcm_right;
  logic [6:0] cmd_addr;
  int checks = 0, failures = 0;

  ac97_tx_shift dut (.*);

  always #5ns clk = ~clk;

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_load = 0; tx_slot = 0; tag = 0; cmd_addr = 0; cmd_data = 0; pcm_left = 0; pcm_right = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 8; f++) begin
      logic [255:0] exp_frame, got;
      tag = 16'($urandom) & 16'hF800; cmd_addr = 7'($urandom); cmd_data = 16'($urandom);
      pcm_left = 16'($urandom); pcm_right = 16'($urandom);
      exp_frame = '0;
      exp_frame[255 -: 16]    = tag;
      exp_frame[255-16 -: 20] = {1'b0, cmd_addr, 12'h000};
      exp_frame[255-36 -: 20] = {cmd_data, 4'h0};
      exp_frame[255-56 -: 20] = {pcm_left, 4'h0};
      exp_frame[255-76 -: 20] = {pcm_right, 4'h0};
      // bit position -1: load slot 0
      for (int p = -1; p < 255; p++) begin
        @(negedge clk);
        tx_load = 0;
        if (p == -1) begin tx_load = 1; tx_slot = 0; end
        for (int s = 1; s <= 12; s++) if (p + 1 == 16 + 20 * (s - 1)) begin tx_load = 1; tx_slot = 4'(s); end
        @(posedge clk);
        #1ns;
        got[255 - (p + 1)] = sdata_out;
      end
      for (int b = 0; b < 256; b++) begin
        checks++;
        if (got[255-b] !== exp_frame[255-b]) begin
          failures++;
          if (failures < 10) $display("FAIL: frame %0d bit %0d", f, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
