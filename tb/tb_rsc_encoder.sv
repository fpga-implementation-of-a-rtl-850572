// tb_rsc_encoder: self-checking testbench for rsc_encoder.
//
// Two instances: the default encoder (16-bit frame, 4 memories, feedback
// 1+D^3+D^4, feed-forward 1+D+D^3+D^4) and a rate-1/2 K=3 encoder with
// feedback 1+D+D^2 and feed-forward 1+D^2. Both get the same frames. The
// default one must give the reference systematic and parity words for
// frame 1111000011001011, and both must match the reference model on
// random frames, bit by bit on the serial outputs and as parallel words.
// Also checked: framehead comes exactly DATA_BITS+MEM cycles after start,
// a start while busy is ignored, and the trellis ends in the zero state.
module tb_rsc_encoder;
  import mtc_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] frame = '0;

  // Default instance.
  logic        sb_a, pb_a, fh_a, busy_a;
  logic [19:0] sys_a, par_a;
  rsc_encoder dut_a (
    .data_clk (clk), .reset_n (rst_n), .start (start), .frame (frame),
    .sysbitout (sb_a), .paribitout (pb_a), .systematic_data (sys_a),
    .parity_data (par_a), .framehead (fh_a), .busy (busy_a));

  // K = 3 instance.
  logic        sb_b, pb_b, fh_b, busy_b;
  logic [17:0] sys_b, par_b;
  rsc_encoder #(.DATA_BITS(16), .MEM(2), .FB_TAPS(3'b110), .FF_TAPS(3'b101)) dut_b (
    .data_clk (clk), .reset_n (rst_n), .start (start), .frame (frame),
    .sysbitout (sb_b), .paribitout (pb_b), .systematic_data (sys_b),
    .parity_data (par_b), .framehead (fh_b), .busy (busy_b));

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // Encode one frame on both instances and compare everything.
  task automatic run_frame(input logic [N-1:0] f, input bit poke_start);
    bits_t es_a, ep_a, es_b, ep_b;
    logic [19:0] ws_a, wp_a;
    logic [17:0] ws_b, wp_b;
    rsc_ref(64'(f), N, 4, 16'b11000, 16'b11011, es_a, ep_a);
    rsc_ref(64'(f), N, 2, 16'b110, 16'b101, es_b, ep_b);
    @(negedge clk);
    frame = f;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    frame = ~f;                 // frame must have been captured at start
    for (int t = 0; t < 20; t++) begin
      if (poke_start && t == 5) start = 1'b1;   // must be ignored
      @(posedge clk);
      #1;
      if (poke_start && t == 5) start = 1'b0;
      check(sb_a === es_a[t] && pb_a === ep_a[t], $sformatf("K5 serial bit %0d", t));
      if (t < 18) check(sb_b === es_b[t] && pb_b === ep_b[t], $sformatf("K3 serial bit %0d", t));
      check(fh_a === (t == 19), $sformatf("K5 framehead at cycle %0d", t + 1));
      if (t == 17) check(fh_b === 1'b1, "K3 framehead after 18 cycles");
      if (t < 19) check(busy_a === 1'b1, "K5 busy during frame");
    end
    check(busy_a === 1'b0, "K5 idle after frame");
    for (int t = 0; t < 20; t++) begin ws_a[t] = es_a[t]; wp_a[t] = ep_a[t]; end
    for (int t = 0; t < 18; t++) begin ws_b[t] = es_b[t]; wp_b[t] = ep_b[t]; end
    check(sys_a === ws_a && par_a === wp_a,
          $sformatf("K5 words %h %h, expected %h %h", sys_a, par_a, ws_a, wp_a));
    check(sys_b === ws_b && par_b === wp_b, "K3 words");
    check(dut_a.state === '0 && dut_b.state === '0, "trellis terminated");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Published reference frame.
    run_frame(16'b1111000011001011, 1'b0);
    check(sys_a === 20'b10011111000011001011, "reference systematic word");
    check(par_a === 20'b10000011001100001101, "reference RSC parity word");
    // Frame given as a bit sequence, first bit at bit 0.
    run_frame(16'b1001001101011110, 1'b1);
    for (int k = 0; k < 40; k++) run_frame(16'($urandom), (k % 3) == 0);
    run_frame('0, 1'b0);
    check(sys_a === '0 && par_a === '0, "all-zero frame gives all-zero words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
