// tb_zz_encoder: self-checking testbench for zz_encoder.
//
// A 3 x 2 instance gets the worked example (data 0,1,1,0,0,1 gives parity
// 1,0,1) and all 64 inputs; a 4 x 5 instance gets random words. Expected
// parity is the running XOR of rows, computed here bit by bit.
module tb_zz_encoder;

  logic [5:0]  d_s;
  logic [2:0]  p_s;
  logic [19:0] d_l;
  logic [3:0]  p_l;

  zz_encoder #(.I(3), .J(2)) dut_s (.data(d_s), .parity(p_s));
  zz_encoder                 dut_l (.data(d_l), .parity(p_l));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
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

  function automatic logic [7:0] ref_zz(input logic [31:0] d, input int ni, input int nj);
    logic [7:0] p;
    bit acc;
    p = '0;
    acc = 0;
    for (int r = 0; r < ni; r++) begin
      for (int c = 0; c < nj; c++) acc ^= d[r * nj + c];
      p[r] = acc;
    end
    return p;
  endfunction

  initial begin
    // Worked example: the sequence 0,1,1,0,0,1 with its first bit at bit 0.
    d_s = 6'b100110;
    #1;
    check(p_s === 3'b101, $sformatf("worked example: parity %b", p_s));
    for (int v = 0; v < 64; v++) begin
      d_s = 6'(v);
      #1;
      check(p_s === 3'(ref_zz(32'(v), 3, 2)), $sformatf("3x2 input %b", d_s));
    end
    for (int k = 0; k < 500; k++) begin
      d_l = 20'($urandom);
      #1;
      check(p_l === 4'(ref_zz(32'(d_l), 4, 5)), $sformatf("4x5 input %h", d_l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
