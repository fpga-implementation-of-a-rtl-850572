// tb_mtc_encoder: end-to-end self-checking testbench for the MTC encoder at
// its default sizes (16-bit frame, 20-bit systematic, RSC parity and
// zig-zag parity words).
//
// Frames: the published reference frame 1111000011001011, whose three
// 20-bit words are known; the 16-bit example sequence
// 0,1,1,1,1,0,1,0,1,1,0,0,1,0,0,1 (first bit at bit 0); then random frames.
// Every frame is checked bit by bit on the serial outputs and as parallel
// words and code word against the reference model, and its latency must be
// 21 cycles from the start edge to codeword_valid.
//
// Mechanisms driven and counted (each must happen at least once): trellis
// termination with non-zero tail bits, start pulses ignored while busy,
// back-to-back frames (a start on the very edge the previous code word
// completes), and a reset in the middle of a frame.
module tb_mtc_encoder;
  import mtc_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] frame = '0;
  logic        sb, pb, cw_valid, busy;
  logic [19:0] sys, par, zig;
  logic [59:0] cw;

  mtc_encoder dut (
    .data_clk (clk), .reset_n (rst_n), .start (start), .frame (frame),
    .sysbitout (sb), .paribitout (pb), .systematic_data (sys),
    .RSCparity (par), .zigparity (zig), .codeword (cw),
    .codeword_valid (cw_valid), .busy (busy));

  int checks = 0, failures = 0;
  int n_frames = 0, n_tail = 0, n_ignored = 0, n_b2b = 0, n_reset = 0;
  int cycle = 0;
  int rot [16] = '{0, 8, 0, 4, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  bit rev [16] = '{0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Encode frame f. If pre_started the frame was already accepted at the
  // last edge. hold keeps start high during the frame; chain starts frame
  // next_f on the edge at which this code word completes.
  task automatic do_frame(input logic [15:0] f, input bit pre_started, input bit hold,
                          input bit chain, input logic [15:0] next_f);
    bits_t es, ep;
    logic [19:0] ws, wp, wz;
    int t0;
    rsc_ref(64'(f), 16, 4, 16'b11000, 16'b11011, es, ep);
    for (int t = 0; t < 20; t++) begin ws[t] = es[t]; wp[t] = ep[t]; end
    wz = 20'(zig_ref(64'(ws), 4, 5, 5, rot, rev));
    if (!pre_started) begin
      @(negedge clk);
      check(busy === 1'b0, "idle before start");
      frame = f;
      start = 1'b1;
      @(posedge clk);
      #1;
    end
    t0 = cycle;
    check(busy === 1'b1, "start accepted");
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      start = hold;
      frame = 16'($urandom);
      @(posedge clk);
      if (hold && busy) n_ignored++;
      #1;
      check(sb === es[t] && pb === ep[t], $sformatf("frame %h serial bit %0d", f, t));
    end
    @(negedge clk);
    start = chain;
    if (chain) frame = next_f;
    @(posedge clk);
    #1;
    check(cw_valid === 1'b1 && cycle - t0 == 21,
          $sformatf("code word after %0d cycles, expected 21", cycle - t0));
    check(sys === ws && par === wp && zig === wz,
          $sformatf("frame %h words %h %h %h, expected %h %h %h", f, sys, par, zig, ws, wp, wz));
    check(cw === {wz, wp, ws}, "code word layout");
    if (ws[19:16] != 4'b0) n_tail++;
    if (chain) begin
      check(busy === 1'b1, "back-to-back start accepted");
      n_b2b++;
    end
    n_frames++;
  endtask

  initial begin
    logic [15:0] nxt;
    repeat (3) @(posedge clk);
    #1;
    check(busy === 1'b0 && sys === '0 && par === '0 && zig === '0 && cw_valid === 1'b0,
          "outputs cleared by reset");
    rst_n = 1'b1;

    // Published reference frame and its three words.
    do_frame(16'b1111000011001011, 1'b0, 1'b0, 1'b0, '0);
    check(sys === 20'b10011111000011001011, "reference systematic word");
    check(par === 20'b10000011001100001101, "reference RSC parity word");
    check(zig === 20'b10101100100110111011, "reference zig-zag parity word");

    // Example 16-bit sequence, with start held high through the frame.
    do_frame(16'b1001001101011110, 1'b0, 1'b1, 1'b0, '0);

    // A run of back-to-back frames, some with start held.
    nxt = 16'($urandom);
    do_frame(nxt, 1'b0, 1'b0, 1'b1, 16'hA5C3);
    do_frame(16'hA5C3, 1'b1, 1'b1, 1'b1, 16'h0001);
    nxt = 16'h0001;
    for (int k = 0; k < 30; k++) begin
      logic [15:0] f;
      f = nxt;
      nxt = 16'($urandom);
      do_frame(f, 1'b1, (k % 4) == 1, k != 29, nxt);
    end

    // Reset in the middle of a frame, then a clean frame.
    @(negedge clk);
    frame = 16'hFFFF;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (7) @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(busy === 1'b0 && sys === '0 && par === '0 && sb === 1'b0 && pb === 1'b0,
          "mid-frame reset clears the encoder");
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    do_frame(16'hFFFF, 1'b0, 1'b0, 1'b0, '0);
    do_frame('0, 1'b0, 1'b0, 1'b0, '0);
    check(cw === '0, "all-zero frame gives the all-zero code word");

    $display("frames=%0d nonzero_tails=%0d ignored_starts=%0d back_to_back=%0d resets=%0d",
             n_frames, n_tail, n_ignored, n_b2b, n_reset);
    check(n_tail > 0, "termination with non-zero tail bits happened");
    check(n_ignored > 0, "start while busy happened");
    check(n_b2b > 0, "back-to-back frames happened");
    check(n_reset > 0, "mid-frame reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
