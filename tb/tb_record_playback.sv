// tb_record_playback: the record/playback control with a 16-entry audio
// FIFO. Records samples until the FIFO is full (recording stops by itself),
// checks that only the left channel is stored, plays them back on request
// with a one-cycle answer carrying the sample in both halves, checks that the
// request that finds the FIFO empty ends playback unanswered, and that a
// play press during recording switches to playback.
module tb_record_playback;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic record_btn = 0, play_btn = 0;
  logic [31:0] PCM_DOut, PCM_DIn;
  logic PCM_OutValid = 0, PCM_InRequest = 0, PCM_InValid;
  logic fifo_clear, fifo_wr, fifo_rd, fifo_full, fifo_empty, recording, playing;
  logic [15:0] fifo_din, fifo_dout;
  logic [4:0]  fifo_count;
  int checks = 0, failures = 0;

  record_playback dut (.*);
  audio_fifo #(.WIDTH(16), .DEPTH(DEPTH)) fifo (
    .clk(clk), .rst(rst), .clear(fifo_clear), .wr_en(fifo_wr), .din(fifo_din),
    .rd_en(fifo_rd), .dout(fifo_dout), .full(fifo_full), .empty(fifo_empty),
    .count(fifo_count));

  always #5ns clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    repeat (4) @(negedge clk);
    b = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic give_sample(logic [31:0] s);
    @(negedge clk);
    PCM_DOut = s; PCM_OutValid = 1;
    @(negedge clk);
    PCM_OutValid = 0;
    repeat (3) @(negedge clk);
  endtask

  // request, then return whether it was answered and with what
  task automatic request(output bit answered, output logic [31:0] s);
    @(negedge clk);
    PCM_InRequest = 1;
    @(negedge clk);
    PCM_InRequest = 0;
    answered = PCM_InValid;
    s = PCM_DIn;
    @(negedge clk);
    check(!PCM_InValid, "answer lasts one cycle");
  endtask

  initial begin
    #500us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rec [$];
    bit a;
    logic [31:0] s;
    PCM_DOut = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // samples while idle are not stored
    give_sample(32'h1111_2222);
    check(fifo_empty, "idle: nothing recorded");
    // record until full
    press(record_btn);
    check(recording, "recording after record press");
    for (int i = 0; i < DEPTH + 4; i++) begin
      logic [31:0] x;
      x = $urandom;
      if (i < DEPTH) rec.push_back(x[31:16]);
      give_sample(x);
    end
    check(fifo_full, "FIFO full");
    check(!recording, "recording ends when full");
    // play back
    press(play_btn);
    check(playing, "playing after play press");
    for (int i = 0; i < DEPTH; i++) begin
      request(a, s);
      check(a, "request answered");
      check(s == {rec[i], rec[i]}, $sformatf("play %0d: %h expected %h", i, s, {rec[i], rec[i]}));
    end
    request(a, s);
    check(!a, "request on empty FIFO not answered");
    check(!playing, "playback ends when empty");
    // record again, play press mid-recording switches to playback
    press(record_btn);
    give_sample(32'hABCD_0000);
    give_sample(32'h1234_0000);
    check(fifo_count == 2, "record restarted from an empty FIFO");
    press(play_btn);
    check(playing && !recording, "play press during recording");
    request(a, s);
    check(a && s == 32'hABCD_ABCD, "first sample of the second recording");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
