// SAD accumulator: random MB pairs at every precision, compared with a
// software SAD of the truncated pixels; the result must appear one cycle
// after the last row.
module tb_sad_unit;
  localparam int N = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0] prec;
  logic in_valid, in_first, in_last, sad_valid;
  logic [N*D-1:0] cur_row, cand_row;
  logic [15:0] sad;
  int checks = 0, failures = 0;

  sad_unit #(.N(N), .D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; prec = 4'd8; cur_row = '0; cand_row = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int exp_sad, p, a, b, mode;
      p = 1 + (t % D);
      mode = t % 3;  // 0 random, 1 extreme values, 2 identical
      exp_sad = 0;
      prec = 4'(p);
      for (int r = 0; r < N; r++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          a = (mode == 1) ? 255 : $urandom_range(0, 255);
          b = (mode == 1) ? 0 : (mode == 2) ? a : $urandom_range(0, 255);
          cur_row[i*D +: D] = D'(a);
          cand_row[i*D +: D] = D'(b);
          a = a & (255 << (D - p)) & 255;
          b = b & (255 << (D - p)) & 255;
          exp_sad += (a > b) ? a - b : b - a;
        end
        in_valid = ($urandom_range(0, 4) != 0) || 1'b1;
        in_first = (r == 0);
        in_last = (r == N - 1);
      end
      @(negedge clk);
      in_valid = 0; in_first = 0; in_last = 0;
      checks++;
      if (!sad_valid || int'(sad) != exp_sad) begin
        failures++;
        if (failures < 10) $display("prec %0d: sad %0d valid %0d expected %0d", p, sad, sad_valid, exp_sad);
      end
      // an idle gap between blocks
      if (t % 2 == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
