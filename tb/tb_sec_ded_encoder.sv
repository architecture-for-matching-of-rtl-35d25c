// Test of the SEC-DED encoder.
//   (8,4): every tag is checked against parity equations written out by hand for the
//   extended Hamming code with data columns 3,5,6,7:
//     p0 = d0^d1^d3, p1 = d0^d2^d3, p2 = d1^d2^d3, p3 = overall parity.
//   (8,4) and (16,11), exhaustively, and (40,33), on random tags: every nonzero
//   codeword {data, parity} must have at least 4 ones, the minimum distance that
//   makes the code single-error-correcting and double-error-detecting.
module tb_sec_ded_encoder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [3:0]  d8;  logic [3:0] p8;
  logic [10:0] d16; logic [4:0] p16;
  logic [32:0] d40; logic [6:0] p40;

  sec_ded_encoder #(.N(8),  .K(4))  u8  (.data(d8),  .parity(p8));
  sec_ded_encoder #(.N(16), .K(11)) u16 (.data(d16), .parity(p16));
  sec_ded_encoder #(.N(40), .K(33)) u40 (.data(d40), .parity(p40));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, longint value);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s data=%0h", what, value);
    end
  endtask

  initial begin
    logic [3:0] exp8;
    for (int v = 0; v < 16; v++) begin
      d8 = 4'(v);
      @(negedge clk);
      exp8[0] = d8[0] ^ d8[1] ^ d8[3];
      exp8[1] = d8[0] ^ d8[2] ^ d8[3];
      exp8[2] = d8[1] ^ d8[2] ^ d8[3];
      exp8[3] = ^{d8, exp8[2:0]};
      check(p8 == exp8, "(8,4) parity", v);
      if (v != 0) check($countones({d8, p8}) >= 4, "(8,4) weight", v);
    end
    for (int v = 1; v < 2048; v++) begin
      d16 = 11'(v);
      @(negedge clk);
      check($countones({d16, p16}) >= 4, "(16,11) weight", v);
    end
    for (int t = 0; t < 1000; t++) begin
      // sparse tags reach the low-weight codewords
      d40 = (t % 2 == 0) ? (33'd1 << ($urandom % 33)) | (33'd1 << ($urandom % 33))
                         : {$urandom, $urandom};
      if (d40 == '0) d40 = 33'd1;
      @(negedge clk);
      check($countones({d40, p40}) >= 4, "(40,33) weight", longint'(d40));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
