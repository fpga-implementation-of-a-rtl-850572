// tb_zigzag_encoder: self-checking testbench for zigzag_encoder.
//
// The default instance (5 branches of 4 x 5) must turn the reference
// systematic word 10011111000011001011 into the reference zig-zag parity
// word 10101100100110111011, and match the reference model on random
// words. Also checked: zigparity loads only on a clock edge with framehead
// high, holds otherwise, and clears on reset.
module tb_zigzag_encoder;
  import mtc_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, fh = 1'b0;
  logic [19:0] sys = '0;
  logic [19:0] zig;

  zigzag_encoder dut (.data_clk(clk), .reset_n(rst_n), .framehead(fh),
                      .SYSTEMATIC(sys), .zigparity(zig));

  int checks = 0, failures = 0;
  int rot [16] = '{0, 8, 0, 4, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  bit rev [16] = '{0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  task automatic load(input logic [19:0] w);
    @(negedge clk);
    sys = w;
    fh = 1'b1;
    @(negedge clk);
    fh = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(zig === '0, "cleared by reset");
    rst_n = 1'b1;
    load(20'b10011111000011001011);
    check(zig === 20'b10101100100110111011, $sformatf("reference parity word: %b", zig));
    for (int k = 0; k < 300; k++) begin
      logic [19:0] w, held;
      w = 20'($urandom);
      load(w);
      check(zig === 20'(zig_ref(64'(w), 4, 5, 5, rot, rev)), $sformatf("word %h", w));
      // Without framehead the output holds whatever the input does.
      held = zig;
      @(negedge clk);
      sys = ~w;
      @(negedge clk);
      check(zig === held, "holds without framehead");
    end
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(zig === '0, "cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
