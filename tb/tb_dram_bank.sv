// DRAM bank: bit-plane storage, word-line activation timing and precision.
//  - words written through the write port read back bit-exactly;
//  - a read on a closed word-line waits T_ACT + 1 cycles and pulses act once;
//  - reads along the open word-line are one per cycle (burst);
//  - with prec < D the low bit planes read as zero;
//  - a write closes the word-line.
module tb_dram_bank;
  localparam int N = 16, D = 8, ROWS = 8, COLS = 8, T_ACT = 3;
  localparam int RAW = 3, CAW = 3, PW = 4;
  logic clk = 0, rst_n = 0;
  logic [PW-1:0] prec;
  logic rd_req, rd_hit, rd_en, rd_valid, wr_en, act;
  logic [RAW-1:0] rd_row, wr_row;
  logic [CAW-1:0] rd_col, wr_col;
  logic [N*D-1:0] rd_data, wr_data;
  logic [N*D-1:0] shadow [ROWS][COLS];
  int checks = 0, failures = 0, acts = 0;

  dram_bank #(.N(N), .D(D), .ROWS(ROWS), .COLS(COLS), .T_ACT(T_ACT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (act) acts++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N*D-1:0] masked(logic [N*D-1:0] w, int p);
    logic [N*D-1:0] m;
    for (int i = 0; i < N; i++) m[i*D +: D] = w[i*D +: D] & (8'hff << (D - p));
    return m;
  endfunction

  // read one word; returns the number of cycles from request to data
  task automatic read_word(int row, int col, int p, output int lat);
    lat = 0;
    @(negedge clk);
    prec = PW'(p); rd_req = 1; rd_row = RAW'(row); rd_col = CAW'(col);
    #1;
    while (!rd_hit) begin
      @(negedge clk); lat++;
    end
    rd_en = 1;
    @(negedge clk);
    rd_en = 0; rd_req = 0; lat++;
    checks++;
    if (!rd_valid || rd_data !== masked(shadow[row][col], p)) begin
      failures++;
      if (failures < 10) $display("read r%0d c%0d p%0d: %h expected %h", row, col, p, rd_data, masked(shadow[row][col], p));
    end
  endtask

  initial begin
    int lat, a0;
    prec = PW'(D); rd_req = 0; rd_en = 0; rd_row = '0; rd_col = '0;
    wr_en = 0; wr_row = '0; wr_col = '0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        wr_en = 1; wr_row = RAW'(r); wr_col = CAW'(c);
        wr_data = {$urandom, $urandom, $urandom, $urandom};
        shadow[r][c] = wr_data;
      end
    @(negedge clk); wr_en = 0;

    // activation latency on a closed word-line
    a0 = acts;
    read_word(2, 0, D, lat);
    checks++;
    if (lat != T_ACT + 2 || acts - a0 != 1) begin
      failures++; $display("miss latency %0d acts %0d", lat, acts - a0);
    end
    // burst along the open word-line: one word per cycle
    @(negedge clk);
    rd_req = 1; rd_row = 3'd2;
    for (int c = 0; c < COLS; c++) begin
      rd_col = CAW'(c);
      #1;
      checks++;
      if (!rd_hit) begin failures++; $display("no hit in burst col %0d", c); end
      rd_en = 1;
      @(negedge clk);
      checks++;
      if (!rd_valid || rd_data !== shadow[2][c]) begin failures++; $display("burst col %0d", c); end
    end
    rd_en = 0; rd_req = 0;
    checks++;
    if (acts - a0 != 1) begin failures++; $display("burst re-activated"); end

    // random reads at random precision
    for (int t = 0; t < 300; t++) begin
      int r, c, p, prev_acts;
      bit same;
      r = $urandom_range(0, ROWS - 1);
      c = $urandom_range(0, COLS - 1);
      p = $urandom_range(1, D);
      same = (dut.open_vld && int'(dut.open_row) == r);
      prev_acts = acts;
      read_word(r, c, p, lat);
      checks++;
      if (same ? (lat != 1 || acts != prev_acts) : (lat != T_ACT + 2 || acts != prev_acts + 1)) begin
        failures++;
        if (failures < 10) $display("latency %0d for %s", lat, same ? "hit" : "miss");
      end
    end

    // a write closes the word-line
    read_word(5, 1, D, lat);
    @(negedge clk);
    wr_en = 1; wr_row = 3'd5; wr_col = 3'd3; wr_data = '1; shadow[5][3] = '1;
    @(negedge clk);
    wr_en = 0;
    read_word(5, 3, D, lat);
    checks++;
    if (lat != T_ACT + 2) begin failures++; $display("write did not close row"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
