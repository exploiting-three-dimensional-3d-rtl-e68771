// Bit-plane sub-array: random writes against a shadow copy, reads return the
// stored word one cycle later, and an idle (truncated) sub-array reads zero.
module tb_dram_subarray;
  localparam int N = 16, WORDS = 64, AW = 6;
  logic clk = 0, en, rd, wr;
  logic [AW-1:0] addr;
  logic [N-1:0] wdata, rdata;
  logic [N-1:0] shadow [WORDS];
  int checks = 0, failures = 0;

  dram_subarray #(.N(N), .WORDS(WORDS), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; rd = 0; wr = 0; addr = '0; wdata = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      wr = 1; addr = AW'(i); wdata = N'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); wr = 0;
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] exp_d;
      int a;
      a = $urandom_range(0, WORDS - 1);
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      rd = 1; addr = AW'(a);
      exp_d = en ? shadow[a] : '0;
      if ($urandom_range(0, 1) == 1) begin
        int b;
        b = $urandom_range(0, WORDS - 1);
        if (b != a) begin
          wr = 1; wdata = N'($urandom);
          // write port shares the address: only write the same word
          wr = 0;
        end
      end
      @(negedge clk);
      rd = 0;
      checks++;
      if (rdata !== exp_d) begin
        failures++;
        if (failures < 10) $display("addr %0d en %0d: %h expected %h", a, en, rdata, exp_d);
      end
      // rewrite the word just read
      wr = 1; wdata = N'($urandom); shadow[a] = wdata;
      @(negedge clk);
      wr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
