// lm4549a_model: behavioural model (testbench only) of the AC link side of
// the LM4549A AC97 codec. Not synthesizable.
//
// Clock: drives AP_BIT_CLOCK at 12.288 MHz while AP_RESET_ is high and holds
// it low while AP_RESET_ is low; it measures every reset pulse.
// Framing: a frame starts on the first rising edge on which AP_SYNC is
// sampled high (after having been low). From that edge on, the model drives
// one bit of its own frame per rising edge on AP_SDATA_IN and samples
// AP_SDATA_OUT on each falling edge. It checks that sync stays high for 16
// bit times.
// Outgoing frames it sends: codec ready (tag bit 15) after READY_FRAMES
// frames; slots 3 and 4 carry a counting test pattern with non-zero low four
// bits, tagged valid at the ADC sample rate; slot 1 carries the slot-request
// bits (11 = slot 3, 10 = slot 4, active low) at the DAC sample rate.
// A reset returns the registers to their defaults. Rates follow registers 2Ch/32h when variable rate audio (2Ah bit 0) is on,
// otherwise every frame.
// Incoming frames it decodes: register writes (slots 1/2) update its register
// file; PCM slots 3/4 are queued. Protocol errors are counted: a valid frame
// before codec ready, non-zero tag bits 10..0, non-zero unused bits in slots
// 1, 2, 3, 4, differing slot 1/2 or slot 3/4 valid bits, and PCM that was not
// requested.
module lm4549a_model #(
  parameter int  READY_FRAMES = 3,
  parameter realtime HALF_PERIOD = 40.690ns    // 12.288 MHz
) (
  input  logic AP_RESET_,
  output logic AP_BIT_CLOCK,
  input  logic AP_SYNC,
  input  logic AP_SDATA_OUT,
  output logic AP_SDATA_IN
);

  // ---- observable state ----
  logic [15:0] regs [128];
  int          frames, valid_frames, writes, pcm_rx, adc_sent_n, dac_req_n;
  int          premature, proto_err, sync_err, unrequested;
  int          reset_pulses, short_resets;
  logic [31:0] adc_sent [$];   // samples sent in slots 3/4 (16-bit halves)
  logic [31:0] adc_log  [$];   // the same, never popped
  logic [31:0] dac_got  [$];   // samples received in slots 3/4
  logic [6:0]  wr_addr  [$];
  logic [15:0] wr_data  [$];

  logic [255:0] in_frame, out_frame;
  int           pos;
  logic         prev_sync, ready, requested, req_pending, armed;
  int           sync_len, since_reset;
  realtime      rst_fall;
  logic [15:0]  adc_l;

  function automatic int period(logic [15:0] rate);
    if (!regs[7'h2A][0] || rate == 0) return 1;
    return 48000 / int'(rate);
  endfunction

  // Register defaults of the LM4549A register map (the registers used here).
  task automatic load_defaults();
    foreach (regs[i]) regs[i] = 16'h0000;
    regs[7'h02] = 16'h8000;
    regs[7'h04] = 16'h8000;
    regs[7'h10] = 16'h8800;
    regs[7'h18] = 16'h8800;
    regs[7'h1C] = 16'h8000;
    regs[7'h2C] = 16'hBB80;
    regs[7'h32] = 16'hBB80;
  endtask

  initial begin
    load_defaults();
    frames = 0; valid_frames = 0; writes = 0; pcm_rx = 0; adc_sent_n = 0;
    dac_req_n = 0; premature = 0; proto_err = 0; sync_err = 0; unrequested = 0;
    reset_pulses = 0; short_resets = 0;
    pos = 256; prev_sync = 1'b0; ready = 1'b0; sync_len = 0; since_reset = 0; armed = 1'b0;
    requested = 1'b0; req_pending = 1'b0; adc_l = 16'h1000;
    in_frame = '0; out_frame = '0; AP_SDATA_IN = 1'b0; rst_fall = 0;
  end

  // ---- bit clock, stopped during reset ----
  initial begin
    AP_BIT_CLOCK = 1'b0;
    forever begin
      if (AP_RESET_ !== 1'b1) begin
        AP_BIT_CLOCK = 1'b0;
        @(posedge AP_RESET_);
        #(10 * HALF_PERIOD);
      end
      #(HALF_PERIOD) AP_BIT_CLOCK = ~AP_BIT_CLOCK;
    end
  end

  always @(negedge AP_RESET_) begin
    rst_fall = $realtime;
    load_defaults();
  end
  always @(posedge AP_RESET_) begin
    if (rst_fall > 0) begin
      reset_pulses++;
      if ($realtime - rst_fall < 1us) short_resets++;
    end
    since_reset = 0; ready = 1'b0; pos = 256; prev_sync = 1'b0; sync_len = 0;
    requested = 1'b0; req_pending = 1'b0; armed = 1'b0;
  end

  // ---- rising edge: sync, framing, drive SDATA_IN ----
  always @(posedge AP_BIT_CLOCK) begin
    // After a reset, framing starts once sync has been seen low: a sync
    // pulse cut short by the reset itself is not counted.
    if (!armed) begin
      armed     = !AP_SYNC;
      prev_sync = 1'b0;
      sync_len  = 0;
    end else if (AP_SYNC) sync_len++;
    if (armed && !AP_SYNC && prev_sync) begin
      if (sync_len != 16) begin
        sync_err++;
        $display("codec model: sync high for %0d bit times at %t", sync_len, $realtime);
      end
      sync_len = 0;
    end
    if (armed && AP_SYNC && !prev_sync) begin
      logic adc_valid, dac_req;
      ready     = (since_reset >= READY_FRAMES);
      adc_valid = ready && (frames % period(regs[7'h32]) == 0);
      dac_req   = ready && (frames % period(regs[7'h2C]) == 0);
      in_frame  = '0;
      in_frame[255]     = ready;
      in_frame[255-3]   = adc_valid;
      in_frame[255-4]   = adc_valid;
      // slot 1 occupies frame bits 16..35; its bit b is frame bit 35-b
      in_frame[255-(35-11)] = !dac_req;
      in_frame[255-(35-10)] = !dac_req;
      if (adc_valid) begin
        logic [15:0] adc_r;
        adc_r = ~adc_l;
        in_frame[255-56 -: 20] = {adc_l, 4'hA};
        in_frame[255-76 -: 20] = {adc_r, 4'h5};
        adc_sent.push_back({adc_l, adc_r});
        adc_log.push_back({adc_l, adc_r});
        adc_sent_n++;
        adc_l = adc_l + 16'h0101;
      end
      requested   = req_pending;   // PCM may come in the frame after a request
      req_pending = dac_req;
      if (dac_req) dac_req_n++;
      frames++;
      since_reset++;
      pos = 0;
    end else if (pos < 256) begin
      pos++;
    end
    prev_sync = AP_SYNC;
    AP_SDATA_IN <= (pos < 256) ? in_frame[255-pos] : 1'b0;
  end

  // ---- falling edge: sample SDATA_OUT, decode at the end of a frame ----
  always @(negedge AP_BIT_CLOCK) begin
    if (pos < 256) begin
      out_frame[255-pos] = AP_SDATA_OUT;
      if (pos == 255) decode();
    end
  end

  task automatic decode();
    logic [15:0] tag;
    logic [19:0] s1, s2, s3, s4;
    tag = out_frame[255 -: 16];
    s1  = out_frame[255-16 -: 20];
    s2  = out_frame[255-36 -: 20];
    s3  = out_frame[255-56 -: 20];
    s4  = out_frame[255-76 -: 20];
    if (tag[10:0] != 0) proto_err++;
    if (!tag[15]) begin
      if (tag != 0 || s1 != 0 || s2 != 0 || s3 != 0 || s4 != 0) proto_err++;
      return;
    end
    if (!ready) premature++;
    valid_frames++;
    if (tag[14] != tag[13] || tag[12] != tag[11]) proto_err++;
    if (tag[14]) begin
      if (s1[19] || s1[11:0] != 0 || s2[3:0] != 0) proto_err++;
      regs[s1[18:12]] = s2[19:4];
      wr_addr.push_back(s1[18:12]);
      wr_data.push_back(s2[19:4]);
      writes++;
    end
    if (tag[12]) begin
      if (s3[3:0] != 0 || s4[3:0] != 0) proto_err++;
      if (!requested) unrequested++;
      dac_got.push_back({s3[19:4], s4[19:4]});
      pcm_rx++;
    end
  endtask

endmodule
