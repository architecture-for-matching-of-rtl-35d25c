// Test of the interconnection.
//   (8,4): the wiring drawn for the code is checked bit by bit. Of each 4-input
//   first-level accumulator, outputs 1 and 2 have weight 2 and output 3 weight 1, so
//     groups[1][3:0] = {par[2], par[1], tag[2], tag[1]}   (the four 2's)
//     groups[0][1:0] = {par[3], tag[3]}                   (the two 1's)
//   and everything else is 0.
//   (16,11): for random inputs, the weighted sum of the group bits (2 per bit of
//   groups[1], 1 per bit of groups[0]) must equal the weighted sum of the kept bits
//   of an 11-input and a 5-input accumulator, so that no bit is lost or duplicated.
module tb_interconnection;
  import ecc_match_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [3:0] tag8, par8;
  logic [1:0][7:0] g8;
  logic [10:0] tag16;
  logic [4:0]  par16;
  logic [1:0][15:0] g16;

  interconnection #(.K(4),  .P(4), .RMAX(2)) u8  (.tag_bits(tag8),  .par_bits(par8),  .groups(g8));
  interconnection #(.K(11), .P(5), .RMAX(2)) u16 (.tag_bits(tag16), .par_bits(par16), .groups(g16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  initial begin
    int s_in, s_out;
    for (int v = 0; v < 256; v++) begin
      {tag8, par8} = 8'(v);
      @(negedge clk);
      check(g8[1] == {4'b0, par8[2], par8[1], tag8[2], tag8[1]}, "(8,4) 2's group", v);
      check(g8[0] == {6'b0, par8[3], tag8[3]}, "(8,4) 1's group", v);
    end
    for (int t = 0; t < 500; t++) begin
      tag16 = 11'($urandom);
      par16 = 5'($urandom);
      @(negedge clk);
      s_in = 0;
      for (int i = 0; i < 11; i++)
        if (tag16[i] && bwa_out_valid(11, 0, 2, i)) s_in += 1 << bwa_out_lw(11, 0, i);
      for (int i = 0; i < 5; i++)
        if (par16[i] && bwa_out_valid(5, 0, 2, i)) s_in += 1 << bwa_out_lw(5, 0, i);
      s_out = 2 * $countones(g16[1]) + $countones(g16[0]);
      check(s_in == s_out, "(16,11) weighted sum", t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
