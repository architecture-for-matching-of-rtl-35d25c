// Test of the butterfly-formed weight accumulator in five configurations, each
// driven exhaustively:
//   u8   8 inputs, plain: outputs I..P must satisfy
//        8I + 4(J+K+M) + 2(L+N+O) + P = number of 1s (weights written out here)
//   u11  11 inputs, plain (odd sizes at several stages): weighted sum = count
//   u4t  4 inputs, limit 2 (first-level accumulator of the (8,4) code): the weight-4
//        bit goes to ovf, which must be set exactly for four 1s; otherwise
//        2*out[1] + 2*out[2] + out[3] = count
//   u4w  4 inputs of weight 2, limit 2 (the accumulator for 2's): ovf exactly for
//        two or more 1s, otherwise 2*out[3] = 2*count
//   u12  12 inputs, limit 2: ovf only when the count exceeds 2, otherwise the
//        weighted sum of the kept outputs equals the count
module tb_bwa;
  import ecc_match_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [7:0]  in8,  out8;   logic ovf8;
  logic [10:0] in11, out11;  logic ovf11;
  logic [3:0]  in4t, out4t;  logic ovf4t;
  logic [3:0]  in4w, out4w;  logic ovf4w;
  logic [11:0] in12, out12;  logic ovf12;

  bwa #(.N(8))                         u8  (.in_bits(in8),  .out_bits(out8),  .ovf(ovf8));
  bwa #(.N(11), .LIMIT(16))            u11 (.in_bits(in11), .out_bits(out11), .ovf(ovf11));
  bwa #(.N(4),  .LW(0), .LIMIT(2))     u4t (.in_bits(in4t), .out_bits(out4t), .ovf(ovf4t));
  bwa #(.N(4),  .LW(1), .LIMIT(2))     u4w (.in_bits(in4w), .out_bits(out4w), .ovf(ovf4w));
  bwa #(.N(12), .LW(0), .LIMIT(2))     u12 (.in_bits(in12), .out_bits(out12), .ovf(ovf12));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, int value);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s input=%0h", what, value);
    end
  endtask

  function automatic int wsum(int n, int lw0, int limit, logic [15:0] o);
    int s = 0;
    for (int i = 0; i < n; i++)
      if (o[i] && bwa_out_valid(n, lw0, limit, i)) s += 1 << bwa_out_lw(n, lw0, i);
    return s;
  endfunction

  initial begin
    int d;
    // 8 inputs: the I..P weights of the accumulator
    for (int v = 0; v < 256; v++) begin
      in8 = 8'(v);
      @(negedge clk);
      d = 8 * out8[0] + 4 * (out8[1] + out8[2] + out8[4])
        + 2 * (out8[3] + out8[5] + out8[6]) + out8[7];
      check(d == $countones(in8) && !ovf8, "u8 count", v);
    end
    for (int v = 0; v < 2048; v++) begin
      in11 = 11'(v);
      @(negedge clk);
      check(wsum(11, 0, 16, 16'(out11)) == $countones(in11) && !ovf11, "u11 count", v);
    end
    for (int v = 0; v < 16; v++) begin
      in4t = 4'(v); in4w = 4'(v);
      @(negedge clk);
      check(ovf4t == (in4t == 4'hf), "u4t ovf", v);
      check(out4t[0] == 1'b0, "u4t weight-4 output zero", v);
      if (!ovf4t) check(2 * out4t[1] + 2 * out4t[2] + out4t[3] == $countones(in4t), "u4t count", v);
      check(ovf4w == ($countones(in4w) >= 2), "u4w ovf", v);
      check(out4w[2:0] == 3'b000, "u4w weight-4 outputs zero", v);
      if (!ovf4w) check(2 * out4w[3] == 2 * $countones(in4w), "u4w count", v);
    end
    for (int v = 0; v < 4096; v++) begin
      in12 = 12'(v);
      @(negedge clk);
      if (ovf12) check($countones(in12) > 2, "u12 ovf only beyond limit", v);
      else       check(wsum(12, 0, 2, 16'(out12)) == $countones(in12), "u12 count", v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
