// Exhaustive check of the MB-to-DRAM address mapping at the HDTV frame size:
// every MB index is compared with bank = x%2, row = floor(i/2s),
// col = ((i/2)%s)*N, and no two MBs may share a bank, word-line and column
// range (the MB's N rows must fit in the word-line).
module tb_mb_addr_gen;
  localparam int N = 16, FW = 120, FH = 68, S = 2;
  localparam int ROWS = (FW * FH + 2 * S - 1) / (2 * S);
  localparam int RAW = $clog2(ROWS), CAW = $clog2(S * N);

  logic [6:0] x, y;
  logic bank;
  logic [RAW-1:0] row;
  logic [CAW-1:0] col;
  int checks = 0, failures = 0;
  bit used [int];

  mb_addr_gen #(.N(N), .FW(FW), .FH(FH), .S(S)) dut (.x(x), .y(y), .bank(bank), .row(row), .col(col));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, key;
    for (int yy = 0; yy < FH; yy++)
      for (int xx = 0; xx < FW; xx++) begin
        x = 7'(xx); y = 7'(yy);
        #1;
        i = yy * FW + xx;
        checks++;
        if (bank !== xx[0] || row != RAW'(i / (2 * S)) || col != CAW'(((i / 2) % S) * N)) begin
          failures++;
          if (failures < 10) $display("mismatch x=%0d y=%0d bank=%0d row=%0d col=%0d", xx, yy, bank, row, col);
        end
        checks++;
        key = (int'(bank) * ROWS + int'(row)) * S * N + int'(col);
        if (used.exists(key) || int'(col) + N > S * N || int'(row) >= ROWS) begin
          failures++;
          if (failures < 10) $display("collision/overflow x=%0d y=%0d", xx, yy);
        end
        used[key] = 1'b1;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
